// apcr_router_env: one APCR router at (1,1) of a 3x3 mesh, with a traffic
// source on each input link and a checking sink on each output link.
// It runs NPKT packets per source, waits until every packet has arrived and
// every credit has come home, and reports checks and failures. It also
// counts how often the regulator's mechanisms happened inside the router:
//   multi     a VC sent several flits in one cycle
//   shared    one output link carried flits of several VCs in one cycle
//   boundary  a VC was stopped at the end of its head packet
//   dropped   flits read out of a VC were dropped (not granted)
//   stolen    a sub-channel was stolen (channel-stealing only)
//   credit    a VC was held back by downstream credits
// and the minimum head latency, which must be the zero-load 3 router cycles
// plus 1 cycle on the injection link.
module apcr_router_env
  import apcr_pkg::*;
#(
  parameter scheme_e SCHEME = SCHEME_CHANNEL_STEALING,
  parameter int NPKT = 100,
  parameter int RATE = 300
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   n_multi, output int n_shared, output int n_boundary,
  output int   n_dropped, output int n_stolen, output int n_credit
);
  localparam int D = VC_DEPTH;
  link_t   [NUM_PORTS-1:0] link_in, link_out;
  credit_t [NUM_PORTS-1:0] credit_out, credit_in;
  int made [NUM_PORTS], sent [NUM_PORTS], pk [NUM_PORTS], fl [NUM_PORTS];
  int er [NUM_PORTS], ck [NUM_PORTS], mu [NUM_PORTS], sh [NUM_PORTS], lm [NUM_PORTS], lx [NUM_PORTS];
  logic [NUM_PORTS-1:0] sdone, home;

  apcr_router #(.SCHEME(SCHEME)) dut (
    .clk, .rst_n, .my_x(COORD_W'(1)), .my_y(COORD_W'(1)), .link_in, .credit_out, .link_out, .credit_in
  );

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_p
    apcr_tb_source #(.COLS(3), .ROWS(3), .RX(1), .RY(1), .FROM(p), .DEPTH(D),
                     .NPKT(NPKT), .RATE(RATE), .SRC_ID(p)) u_src (
      .clk, .rst_n, .link(link_in[p]), .credit(credit_out[p]),
      .made(made[p]), .flits_sent(sent[p]), .done(sdone[p]), .credits_home(home[p])
    );
    apcr_tb_sink #(.TX(1), .TY(1), .PORT(p), .DEPTH(D)) u_sink (
      .clk, .rst_n, .link(link_out[p]), .credit(credit_in[p]),
      .pkts(pk[p]), .flits(fl[p]), .errors(er[p]), .checks(ck[p]),
      .multi(mu[p]), .shared(sh[p]), .lat_min(lm[p]), .lat_exact(lx[p])
    );
  end

  // mechanism counters from the router's allocation cycle
  logic [NUM_PORTS-1:0][NUM_VC-1:0][CNT_W-1:0] run_mon;
  for (genvar i = 0; i < NUM_PORTS; i++) begin : g_mon
    assign run_mon[i] = dut.g_in[i].u_in.run;
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_boundary <= 0; n_dropped <= 0; n_stolen <= 0; n_credit <= 0;
    end else begin
      int b, d, s, c;
      b = 0; d = 0; s = 0; c = 0;
      for (int i = 0; i < NUM_PORTS; i++)
        for (int v = 0; v < NUM_VC; v++) begin
          int cnt, win;
          cnt = int'(dut.vc_count[i][v]);
          win = (cnt < NUM_SUB) ? cnt : NUM_SUB;
          if (dut.sa_req[i][v] && int'(run_mon[i][v]) < win) b++;
          if (dut.grant_n[i][v] != 0 && int'(dut.grant_n[i][v]) < win) d++;
          if (dut.sa_req[i][v] && dut.sa_want[i][v] < run_mon[i][v]) c++;
        end
      for (int o = 0; o < NUM_PORTS; o++)
        for (int k = 0; k < NUM_SUB; k++) s += int'(dut.stolen[o][k]);
      n_boundary <= n_boundary + b;
      n_dropped  <= n_dropped + d;
      n_stolen   <= n_stolen + s;
      n_credit   <= n_credit + c;
    end
  end

  always_comb begin
    int ts, tr, lmin;
    ts = 0; tr = 0; lmin = 1 << 30;
    checks = 0; failures = 0; n_multi = 0; n_shared = 0;
    for (int p = 0; p < NUM_PORTS; p++) begin
      ts += made[p];
      tr += pk[p];
      checks += ck[p];
      failures += er[p];
      n_multi += mu[p];
      n_shared += sh[p];
      if (lm[p] < lmin) lmin = lm[p];
    end
    finished = (&sdone) && (ts == tr);
    if (finished) begin
      checks += 2;
      if (lmin != 4) failures++;
    end
  end

  final begin
    int lmin;
    lmin = 1 << 30;
    for (int p = 0; p < NUM_PORTS; p++) if (lm[p] < lmin) lmin = lm[p];
    $display("router env scheme %0d: min latency %0d multi %0d shared %0d boundary %0d dropped %0d stolen %0d credit %0d",
             SCHEME, lmin, n_multi, n_shared, n_boundary, n_dropped, n_stolen, n_credit);
  end
endmodule
