// tb_apcr_router: the APCR router with each of the three regulation schemes,
// side by side, under random traffic from all five inputs (1- and 5-flit
// packets, 60% short). Every packet must arrive whole, in order, at the right
// output with the right lookahead route; all credits must return; the
// zero-load latency must be 3 cycles in the router. The schemes must show
// their mechanisms: monopolizing sends several flits of one packet at once and
// stops at packet boundaries; fair-sharing puts flits of several VCs on one
// link; channel-stealing does both and steals idle sub-channels.
module tb_apcr_router;
  import apcr_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [2:0] fin;
  int ck [3], fl [3], mu [3], sh [3], bo [3], dr [3], st [3], cr [3];
  int checks = 0, failures = 0, cyc = 0;

  apcr_router_env #(.SCHEME(SCHEME_MONOPOLIZING), .NPKT(300), .RATE(400)) e_mono (
    .clk, .rst_n, .finished(fin[0]), .checks(ck[0]), .failures(fl[0]), .n_multi(mu[0]),
    .n_shared(sh[0]), .n_boundary(bo[0]), .n_dropped(dr[0]), .n_stolen(st[0]), .n_credit(cr[0]));
  apcr_router_env #(.SCHEME(SCHEME_FAIR_SHARING), .NPKT(300), .RATE(400)) e_fair (
    .clk, .rst_n, .finished(fin[1]), .checks(ck[1]), .failures(fl[1]), .n_multi(mu[1]),
    .n_shared(sh[1]), .n_boundary(bo[1]), .n_dropped(dr[1]), .n_stolen(st[1]), .n_credit(cr[1]));
  apcr_router_env #(.SCHEME(SCHEME_CHANNEL_STEALING), .NPKT(300), .RATE(400)) e_steal (
    .clk, .rst_n, .finished(fin[2]), .checks(ck[2]), .failures(fl[2]), .n_multi(mu[2]),
    .n_shared(sh[2]), .n_boundary(bo[2]), .n_dropped(dr[2]), .n_stolen(st[2]), .n_credit(cr[2]));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic finish_up();
    for (int s = 0; s < 3; s++) begin checks += ck[s]; failures += fl[s]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  task automatic need(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("mechanism never happened: %s", what); end
  endtask

  initial begin : watchdog
    wait (cyc == 100000);
    $display("watchdog: finished=%b", fin);
    failures++;
    finish_up();
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (&fin);
    repeat (5) @(posedge clk);
    $display("all traffic delivered at cycle %0d", cyc);
    need(mu[0] > 0, "monopolizing: several flits of one VC in one cycle");
    need(bo[0] > 0, "monopolizing: stop at a packet boundary");
    need(dr[0] > 0, "monopolizing: read-out flits dropped");
    need(sh[0] == 0, "monopolizing: never shares an output link");
    need(sh[1] > 0, "fair-sharing: several VCs on one link");
    need(mu[1] == 0, "fair-sharing: one flit per VC per cycle");
    need(st[1] == 0, "fair-sharing: no stealing");
    need(st[2] > 0, "channel-stealing: sub-channel stolen");
    need(mu[2] > 0, "channel-stealing: several flits of one VC in one cycle");
    need(sh[2] > 0, "channel-stealing: several VCs on one link");
    need(cr[0] + cr[1] + cr[2] > 0, "a VC held back by credits");
    finish_up();
  end
endmodule
