// apcr_crossbar: the router's 5x5 crossbar, switched at flit granularity.
//
// Each input port reaches the crossbar over one link-wide channel of NUM_SUB
// flit slots; each output port leaves it as NUM_SUB flit-wide sub-channels.
// For every output sub-channel a registered select (valid, input port, input
// slot) chosen by the regulator in the previous cycle picks which slot drives
// it, so flits of different VCs, packets and input ports can share one output
// link in the same cycle. The port count is the paper's; selecting per flit
// slot rather than per whole port is what the regulation schemes need and is
// this design's reading of how the crossbar is used. Purely combinational.
module apcr_crossbar
  import apcr_pkg::*;
(
  input  link_t [NUM_PORTS-1:0]                          in_slots,
  input  logic  [NUM_PORTS-1:0][NUM_SUB-1:0]             sel_valid,
  input  logic  [NUM_PORTS-1:0][NUM_SUB-1:0][PORT_W-1:0] sel_in,
  input  logic  [NUM_PORTS-1:0][NUM_SUB-1:0][CNT_W-1:0]  sel_slot,
  output link_t [NUM_PORTS-1:0]                          out_links
);
  always_comb begin
    for (int o = 0; o < NUM_PORTS; o++) begin
      for (int k = 0; k < NUM_SUB; k++) begin
        out_links[o][k] = '0;
        if (sel_valid[o][k] && int'(sel_in[o][k]) < NUM_PORTS && int'(sel_slot[o][k]) < NUM_SUB)
          out_links[o][k] = in_slots[sel_in[o][k]][sel_slot[o][k]];
      end
    end
  end
endmodule
