// apcr_sa_mono: switch allocator with the Monopolizing regulation scheme.
//
// One VC uses the whole output channel in a cycle, as in a generic router, but
// because a flit is only a quarter of the link it may send several flits at
// once: as many as its request `want` says (the flits of the packet at its
// head, limited by credits and by the number of sub-channels). The structure
// is the generic two-stage separable allocator: a v:1 round-robin arbiter per
// input port picks one requesting VC, then a p:1 round-robin arbiter per
// output port picks one input. The winning VC gets sub-channels 0..want-1 of
// its output. A first-stage pointer only moves when its winner also wins the
// second stage (this design's choice; the paper does not say).
//
// Interface (shared by the three regulators):
//   req[i][v], req_port[i][v], want[i][v]  request of VC v of input port i,
//                                          its output port and flit count (>=1)
//   grant_n[i][v]                          flits granted to that VC this cycle
//   sel_valid/sel_in/sel_vc[o][k]          owner of sub-channel k of output o
// Timing: combinational grant; arbiter pointers update at the clock edge.
module apcr_sa_mono
  import apcr_pkg::*;
(
  input  logic                                     clk,
  input  logic                                     rst_n,
  input  logic  [NUM_PORTS-1:0][NUM_VC-1:0]        req,
  input  port_e [NUM_PORTS-1:0][NUM_VC-1:0]        req_port,
  input  logic  [NUM_PORTS-1:0][NUM_VC-1:0][CNT_W-1:0] want,
  output logic  [NUM_PORTS-1:0][NUM_VC-1:0][CNT_W-1:0] grant_n,
  output logic  [NUM_PORTS-1:0][NUM_SUB-1:0]       sel_valid,
  output logic  [NUM_PORTS-1:0][NUM_SUB-1:0][PORT_W-1:0] sel_in,
  output logic  [NUM_PORTS-1:0][NUM_SUB-1:0][VC_W-1:0]   sel_vc
);
  localparam int unsigned VIW = $clog2(NUM_VC + 1);
  localparam int unsigned PIW = $clog2(NUM_PORTS + 1);

  logic [NUM_PORTS-1:0][NUM_VC-1:0]    s1_gnt;
  logic [NUM_PORTS-1:0][VIW-1:0]       s1_idx;
  logic [NUM_PORTS-1:0]                s1_any, s1_adv;
  logic [NUM_PORTS-1:0][NUM_PORTS-1:0] s2_req, s2_gnt;  // [output][input]
  logic [NUM_PORTS-1:0][PIW-1:0]       s2_idx;
  logic [NUM_PORTS-1:0]                s2_any;

  for (genvar i = 0; i < NUM_PORTS; i++) begin : g_stage1
    apcr_rr_arbiter #(.N(NUM_VC)) u_arb (
      .clk, .rst_n, .req(req[i]), .advance(s1_adv[i]),
      .grant(s1_gnt[i]), .grant_idx(s1_idx[i]), .any(s1_any[i])
    );
  end

  always_comb begin
    for (int o = 0; o < NUM_PORTS; o++)
      for (int i = 0; i < NUM_PORTS; i++)
        s2_req[o][i] = s1_any[i] && (req_port[i][VC_W'(s1_idx[i])] == port_e'(o));
  end

  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_stage2
    apcr_rr_arbiter #(.N(NUM_PORTS)) u_arb (
      .clk, .rst_n, .req(s2_req[o]), .advance(1'b1),
      .grant(s2_gnt[o]), .grant_idx(s2_idx[o]), .any(s2_any[o])
    );
  end

  always_comb begin
    int i, v, n;
    i = 0; v = 0; n = 0;
    grant_n   = '0;
    sel_valid = '0;
    sel_in    = '0;
    sel_vc    = '0;
    s1_adv    = '0;
    for (int o = 0; o < NUM_PORTS; o++) begin
      if (s2_any[o]) begin
        i = int'(s2_idx[o]);
        v = int'(s1_idx[i]);
        n = int'(want[i][v]);
        if (n > NUM_SUB) n = NUM_SUB;
        s1_adv[i]     = 1'b1;
        grant_n[i][v] = CNT_W'(n);
        for (int k = 0; k < NUM_SUB; k++) begin
          if (k < n) begin
            sel_valid[o][k] = 1'b1;
            sel_in[o][k]    = PORT_W'(i);
            sel_vc[o][k]    = VC_W'(v);
          end
        end
      end
    end
  end

endmodule
