// apcr_sa_fair: switch allocator with the Fair-sharing regulation scheme.
//
// The output link is cut into NUM_SUB flit-wide sub-channels and the ID of a VC
// is bound to the ID of a sub-channel: sub-channel k of every output port is
// reserved for VC (k mod NUM_VC) of the input ports. With NUM_SUB = NUM_VC each
// VC owns exactly one sub-channel; with more sub-channels than VCs a VC owns
// several and may use as many of them as it has flits (the m-th of its
// sub-channels is requested only if it wants more than m flits). VCs of one
// input port never compete, so there is a single arbitration stage: one
// round-robin arbiter per output sub-channel choosing among the input ports
// whose bound VC requests that output. A VC cannot use a sub-channel bound to
// another VC, even when that one is idle.
//
// The paper's text gives each sub-channel arbiter p inputs (the input ports);
// its figure labels them v:1. This module follows the text, which is what the
// binding implies.
//
// Interface and timing as apcr_sa_mono.
module apcr_sa_fair
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
  localparam int unsigned PIW = $clog2(NUM_PORTS + 1);

  logic [NUM_PORTS-1:0][NUM_SUB-1:0][NUM_PORTS-1:0] sc_req, sc_gnt;
  logic [NUM_PORTS-1:0][NUM_SUB-1:0][PIW-1:0]       sc_idx;
  logic [NUM_PORTS-1:0][NUM_SUB-1:0]                sc_any;

  always_comb begin
    for (int o = 0; o < NUM_PORTS; o++)
      for (int k = 0; k < NUM_SUB; k++)
        for (int i = 0; i < NUM_PORTS; i++)
          sc_req[o][k][i] = req[i][k % NUM_VC] &&
                            (req_port[i][k % NUM_VC] == port_e'(o)) &&
                            (int'(want[i][k % NUM_VC]) > k / NUM_VC);
  end

  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_out
    for (genvar k = 0; k < NUM_SUB; k++) begin : g_sub
      apcr_rr_arbiter #(.N(NUM_PORTS)) u_arb (
        .clk, .rst_n, .req(sc_req[o][k]), .advance(1'b1),
        .grant(sc_gnt[o][k]), .grant_idx(sc_idx[o][k]), .any(sc_any[o][k])
      );
    end
  end

  always_comb begin
    int i;
    i = 0;
    grant_n   = '0;
    sel_valid = '0;
    sel_in    = '0;
    sel_vc    = '0;
    for (int o = 0; o < NUM_PORTS; o++) begin
      for (int k = 0; k < NUM_SUB; k++) begin
        if (sc_any[o][k]) begin
          i = int'(sc_idx[o][k]);
          sel_valid[o][k] = 1'b1;
          sel_in[o][k]    = PORT_W'(i);
          sel_vc[o][k]    = VC_W'(k % NUM_VC);
          grant_n[i][k % NUM_VC] = grant_n[i][k % NUM_VC] + 1'b1;
        end
      end
    end
  end

endmodule
