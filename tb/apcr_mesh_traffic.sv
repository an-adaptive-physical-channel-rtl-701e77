// apcr_mesh_traffic: network interfaces for every node of a COLS x ROWS mesh.
// Each node injects NPKT uniform-random packets (1 or 5 flits, 60% short) at
// RATE packets per 1000 cycles on its local input, and a sink on its local
// output checks every packet that arrives there (right node, whole, in order,
// no faster than the zero-load latency) and returns credits. `finished` goes
// high when every source is done and every packet has arrived.
module apcr_mesh_traffic
  import apcr_pkg::*;
#(
  parameter int COLS = 4, parameter int ROWS = 4,
  parameter int NPKT = 50, parameter int RATE = 100
) (
  input  logic                         clk,
  input  logic                         rst_n,
  output link_t   [ROWS*COLS-1:0]      local_in,
  input  credit_t [ROWS*COLS-1:0]      local_credit_out,
  input  link_t   [ROWS*COLS-1:0]      local_out,
  output credit_t [ROWS*COLS-1:0]      local_credit_in,
  output logic                         finished,
  output int                           checks,
  output int                           failures,
  output int                           delivered,
  output int                           n_multi,
  output int                           n_shared,
  output int                           n_zero_load
);
  localparam int N = ROWS * COLS;
  int made [N], sent [N], pk [N], fl [N], er [N], ck [N], mu [N], sh [N], lm [N], lx [N];
  logic [N-1:0] sdone, home;

  for (genvar n = 0; n < N; n++) begin : g_node
    apcr_tb_source #(.COLS(COLS), .ROWS(ROWS), .RX(n % COLS), .RY(n / COLS),
                     .FROM(int'(PORT_LOCAL)), .DEPTH(VC_DEPTH), .NPKT(NPKT), .RATE(RATE),
                     .SRC_ID(n)) u_src (
      .clk, .rst_n, .link(local_in[n]), .credit(local_credit_out[n]),
      .made(made[n]), .flits_sent(sent[n]), .done(sdone[n]), .credits_home(home[n])
    );
    apcr_tb_sink #(.TX(n % COLS), .TY(n / COLS), .PORT(int'(PORT_LOCAL)), .DEPTH(VC_DEPTH),
                   .COLS(COLS)) u_sink (
      .clk, .rst_n, .link(local_out[n]), .credit(local_credit_in[n]),
      .pkts(pk[n]), .flits(fl[n]), .errors(er[n]), .checks(ck[n]),
      .multi(mu[n]), .shared(sh[n]), .lat_min(lm[n]), .lat_exact(lx[n])
    );
  end

  always_comb begin
    int ts;
    ts = 0; delivered = 0; checks = 0; failures = 0; n_multi = 0; n_shared = 0; n_zero_load = 0;
    for (int n = 0; n < N; n++) begin
      ts += made[n];
      delivered += pk[n];
      checks += ck[n];
      failures += er[n];
      n_multi += mu[n];
      n_shared += sh[n];
      n_zero_load += lx[n];
    end
    finished = (&sdone) && (ts == delivered) && (ts == N * NPKT);
  end
endmodule
