// apcr_output_port: the state behind one output port.
//
// It keeps one credit counter per downstream VC (free flit slots there,
// DEPTH after reset) and a busy flag per downstream VC (held by a packet from
// the VC allocation of its head until its tail is granted). In the allocation
// cycle the regulator tells it which of its sub-channels carry a flit, for
// which downstream VC, and whether the flit is a tail: each flit costs one
// credit, a tail frees the VC. The downstream router returns up to NUM_SUB
// credits per VC per cycle, so the credit wires carry a count per VC instead
// of a single credit. The crossbar output is captured in the link register,
// which drives the link to the next router.
//
// Credit counting is the paper's; the busy/free VC bookkeeping is the usual
// one of a wormhole router and is this design's choice.
// Timing: credits and out_free are registered state; a credit arriving is
// usable the cycle after; link_out is valid the cycle after xbar_out.
module apcr_output_port
  import apcr_pkg::*;
#(
  parameter int unsigned DEPTH = apcr_pkg::VC_DEPTH,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // allocation-cycle view of this output
  input  logic  [NUM_VC-1:0]              alloc,
  input  logic  [NUM_SUB-1:0]             sa_valid,
  input  logic  [NUM_SUB-1:0][VC_W-1:0]   sa_vc,
  input  logic  [NUM_SUB-1:0]             sa_tail,
  // credits from downstream
  input  credit_t                         credit_in,
  output logic  [NUM_VC-1:0][CW-1:0]      credits,
  output logic  [NUM_VC-1:0]              out_free,
  // data path
  input  link_t                           xbar_out,
  output link_t                           link_out
);
  logic [NUM_VC-1:0] busy_q;
  logic [NUM_VC-1:0][CW-1:0] cnt_q;

  logic [NUM_VC-1:0][CNT_W-1:0] used;  // flits sent per downstream VC this cycle
  logic [NUM_VC-1:0]            rel;   // a tail leaves on this downstream VC

  assign credits  = cnt_q;
  assign out_free = ~busy_q;

  always_comb begin
    used = '0;
    rel  = '0;
    for (int v = 0; v < NUM_VC; v++)
      for (int k = 0; k < NUM_SUB; k++)
        if (sa_valid[k] && sa_vc[k] == VC_W'(v)) begin
          used[v] = used[v] + 1'b1;
          if (sa_tail[k]) rel[v] = 1'b1;
        end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q   <= '0;
      cnt_q    <= {NUM_VC{CW'(DEPTH)}};
      link_out <= '0;
    end else begin
      link_out <= xbar_out;
      for (int v = 0; v < NUM_VC; v++) begin
        cnt_q[v]  <= CW'(int'(cnt_q[v]) - int'(used[v]) + int'(credit_in[v]));
        busy_q[v] <= (busy_q[v] | alloc[v]) & ~rel[v];
      end
    end
  end

  logic credit_ok, alloc_ok;
  always_comb begin
    credit_ok = 1'b1;
    alloc_ok  = 1'b1;
    for (int v = 0; v < NUM_VC; v++) begin
      if (int'(used[v]) > int'(cnt_q[v])) credit_ok = 1'b0;
      if (int'(cnt_q[v]) - int'(used[v]) + int'(credit_in[v]) > DEPTH) credit_ok = 1'b0;
      if (alloc[v] && busy_q[v]) alloc_ok = 1'b0;
    end
  end
  a_credit_bounds: assert property (@(posedge clk) disable iff (!rst_n) credit_ok)
    else $error("output_port: flits sent without credit, or credit overflow");
  a_alloc_free_vc: assert property (@(posedge clk) disable iff (!rst_n) alloc_ok)
    else $error("output_port: a busy VC was allocated again");
endmodule
