// tb_apcr_mesh_full: the mesh at its default size and configuration, 8x8
// routers with channel-stealing, 4 VCs of 4 flits and 512-bit links. Every
// node sends 20 uniform-random packets (1 or 5 flits, 60% short) at 0.05
// packets per node per cycle; every packet must reach its node whole, in
// order, and no earlier than the zero-load latency, some exactly at it, and
// stealing must occur.
module tb_apcr_mesh_full;
  import apcr_pkg::*;
  localparam int C = 8, R = 8, N = C * R, NPKT = 20;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0, cyc = 0;
  logic fin;
  int ck, fl, dl, mu, sh, zl, mg, st;
  link_t   [N-1:0] li, lo;
  credit_t [N-1:0] ci, co;
  logic [N-1:0][NUM_PORTS-1:0][NUM_VC-1:0][CNT_W-1:0] gn;
  logic [N-1:0][NUM_PORTS-1:0][NUM_SUB-1:0] sl;

  apcr_mesh dut (
    .clk, .rst_n, .local_in(li), .local_credit_out(co), .local_out(lo), .local_credit_in(ci));
  apcr_mesh_traffic #(.COLS(C), .ROWS(R), .NPKT(NPKT), .RATE(50)) tr (
    .clk, .rst_n, .local_in(li), .local_credit_out(co), .local_out(lo), .local_credit_in(ci),
    .finished(fin), .checks(ck), .failures(fl), .delivered(dl),
    .n_multi(mu), .n_shared(sh), .n_zero_load(zl));
  for (genvar y = 0; y < R; y++) begin : g_py
    for (genvar x = 0; x < C; x++) begin : g_x
      assign gn[y*C+x] = dut.g_row[y].g_col[x].u_router.grant_n;
      assign sl[y*C+x] = dut.g_row[y].g_col[x].u_router.stolen;
    end
  end
  apcr_mesh_probe #(.N(N)) pr (.clk, .rst_n, .grant_n(gn), .stolen(sl),
    .n_multi_grant(mg), .n_stolen(st));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic finish_up();
    checks += ck; failures += fl;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  task automatic need(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("did not happen: %s", what); end
  endtask

  initial begin : watchdog
    wait (cyc == 50000);
    $display("watchdog: delivered %0d", dl);
    failures++;
    finish_up();
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (fin);
    repeat (5) @(posedge clk);
    $display("delivered %0d multi-grant %0d stolen %0d zero-load %0d at cycle %0d", dl, mg, st, zl, cyc);
    need(dl == N * NPKT, "every packet delivered");
    need(zl > 0, "zero-load latency observed");
    need(mg > 0, "multi-flit grant");
    need(st > 0, "stolen sub-channel");
    finish_up();
  end
endmodule
