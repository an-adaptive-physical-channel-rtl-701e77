// tb_apcr_mesh: end-to-end test of the mesh at 4x4, once per regulation
// scheme. Every node sends 80 uniform-random packets (1 or 5 flits, 60%
// short) at 0.15 packets per node per cycle, above the saturation point the
// paper reports, so the network congests. Every packet must reach its node
// whole and in order, no earlier than the zero-load latency, and some packets
// must take exactly the zero-load latency (3 cycles per router + 1). The
// regulators' mechanisms must all happen: several flits of one VC in one
// cycle (monopolizing, channel-stealing), flits of several VCs on one link
// (fair-sharing, channel-stealing) and stolen sub-channels (channel-stealing).
module tb_apcr_mesh;
  import apcr_pkg::*;
  localparam int C = 4, R = 4, N = C * R;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0, cyc = 0;
  logic [2:0] fin;
  int ck [3], fl [3], dl [3], mu [3], sh [3], zl [3], mg [3], st [3];

  // ---- scheme 0: SCHEME_MONOPOLIZING ----
  link_t   [N-1:0] li0, lo0;
  credit_t [N-1:0] ci0, co0;
  logic [N-1:0][NUM_PORTS-1:0][NUM_VC-1:0][CNT_W-1:0] gn0;
  logic [N-1:0][NUM_PORTS-1:0][NUM_SUB-1:0] sl0;
  apcr_mesh #(.COLS(C), .ROWS(R), .SCHEME(SCHEME_MONOPOLIZING)) dut0 (
    .clk, .rst_n, .local_in(li0), .local_credit_out(co0), .local_out(lo0), .local_credit_in(ci0));
  apcr_mesh_traffic #(.COLS(C), .ROWS(R), .NPKT(80), .RATE(150)) tr0 (
    .clk, .rst_n, .local_in(li0), .local_credit_out(co0), .local_out(lo0), .local_credit_in(ci0),
    .finished(fin[0]), .checks(ck[0]), .failures(fl[0]), .delivered(dl[0]),
    .n_multi(mu[0]), .n_shared(sh[0]), .n_zero_load(zl[0]));
  for (genvar y = 0; y < R; y++) begin : g_p0y
    for (genvar x = 0; x < C; x++) begin : g_x
      assign gn0[y*C+x] = dut0.g_row[y].g_col[x].u_router.grant_n;
      assign sl0[y*C+x] = dut0.g_row[y].g_col[x].u_router.stolen;
    end
  end
  apcr_mesh_probe #(.N(N)) pr0 (.clk, .rst_n, .grant_n(gn0), .stolen(sl0),
    .n_multi_grant(mg[0]), .n_stolen(st[0]));

  // ---- scheme 1: SCHEME_FAIR_SHARING ----
  link_t   [N-1:0] li1, lo1;
  credit_t [N-1:0] ci1, co1;
  logic [N-1:0][NUM_PORTS-1:0][NUM_VC-1:0][CNT_W-1:0] gn1;
  logic [N-1:0][NUM_PORTS-1:0][NUM_SUB-1:0] sl1;
  apcr_mesh #(.COLS(C), .ROWS(R), .SCHEME(SCHEME_FAIR_SHARING)) dut1 (
    .clk, .rst_n, .local_in(li1), .local_credit_out(co1), .local_out(lo1), .local_credit_in(ci1));
  apcr_mesh_traffic #(.COLS(C), .ROWS(R), .NPKT(80), .RATE(150)) tr1 (
    .clk, .rst_n, .local_in(li1), .local_credit_out(co1), .local_out(lo1), .local_credit_in(ci1),
    .finished(fin[1]), .checks(ck[1]), .failures(fl[1]), .delivered(dl[1]),
    .n_multi(mu[1]), .n_shared(sh[1]), .n_zero_load(zl[1]));
  for (genvar y = 0; y < R; y++) begin : g_p1y
    for (genvar x = 0; x < C; x++) begin : g_x
      assign gn1[y*C+x] = dut1.g_row[y].g_col[x].u_router.grant_n;
      assign sl1[y*C+x] = dut1.g_row[y].g_col[x].u_router.stolen;
    end
  end
  apcr_mesh_probe #(.N(N)) pr1 (.clk, .rst_n, .grant_n(gn1), .stolen(sl1),
    .n_multi_grant(mg[1]), .n_stolen(st[1]));

  // ---- scheme 2: SCHEME_CHANNEL_STEALING ----
  link_t   [N-1:0] li2, lo2;
  credit_t [N-1:0] ci2, co2;
  logic [N-1:0][NUM_PORTS-1:0][NUM_VC-1:0][CNT_W-1:0] gn2;
  logic [N-1:0][NUM_PORTS-1:0][NUM_SUB-1:0] sl2;
  apcr_mesh #(.COLS(C), .ROWS(R), .SCHEME(SCHEME_CHANNEL_STEALING)) dut2 (
    .clk, .rst_n, .local_in(li2), .local_credit_out(co2), .local_out(lo2), .local_credit_in(ci2));
  apcr_mesh_traffic #(.COLS(C), .ROWS(R), .NPKT(80), .RATE(150)) tr2 (
    .clk, .rst_n, .local_in(li2), .local_credit_out(co2), .local_out(lo2), .local_credit_in(ci2),
    .finished(fin[2]), .checks(ck[2]), .failures(fl[2]), .delivered(dl[2]),
    .n_multi(mu[2]), .n_shared(sh[2]), .n_zero_load(zl[2]));
  for (genvar y = 0; y < R; y++) begin : g_p2y
    for (genvar x = 0; x < C; x++) begin : g_x
      assign gn2[y*C+x] = dut2.g_row[y].g_col[x].u_router.grant_n;
      assign sl2[y*C+x] = dut2.g_row[y].g_col[x].u_router.stolen;
    end
  end
  apcr_mesh_probe #(.N(N)) pr2 (.clk, .rst_n, .grant_n(gn2), .stolen(sl2),
    .n_multi_grant(mg[2]), .n_stolen(st[2]));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic finish_up();
    for (int s = 0; s < 3; s++) begin checks += ck[s]; failures += fl[s]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  task automatic need(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("did not happen: %s", what); end
  endtask

  initial begin : watchdog
    wait (cyc == 200000);
    $display("watchdog: finished=%b delivered %0d %0d %0d", fin, dl[0], dl[1], dl[2]);
    failures++;
    finish_up();
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (&fin);
    repeat (5) @(posedge clk);
    for (int s = 0; s < 3; s++)
      $display("scheme %0d: delivered %0d multi-grant %0d shared-eject %0d stolen %0d zero-load %0d at cycle %0d",
               s, dl[s], mg[s], sh[s], st[s], zl[s], cyc);
    need(mg[0] > 0, "monopolizing: multi-flit grant");
    need(mg[2] > 0, "channel-stealing: multi-flit grant");
    need(mg[1] == 0, "fair-sharing: never more than one flit per VC");
    need(sh[1] > 0 && sh[2] > 0, "several VCs sharing a link");
    need(st[2] > 0, "channel-stealing: stolen sub-channel");
    for (int s = 0; s < 3; s++) begin
      need(dl[s] == N * 80, "every packet delivered");
      need(zl[s] > 0, "zero-load latency observed");
    end
    finish_up();
  end
endmodule
