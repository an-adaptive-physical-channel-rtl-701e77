// apcr_vc_alloc: virtual-channel allocator.
//
// A head flit at the front of an input VC asks for a VC of the downstream
// router behind its output port. For each output port one round-robin
// p*v:1 arbiter picks one of the requesting input VCs, and the winner gets the
// lowest-numbered free VC of that output port. So each output port grants at
// most one new packet per cycle. The paper keeps the generic router's VC
// allocator unchanged and does not describe it; this simple separable form is
// this design's choice.
//
// Interface: va_req/va_port per input VC; out_free[o][v] marks free downstream
//   VCs; va_grant/va_vc return the result per input VC; alloc[o][v] marks the
//   downstream VCs taken this cycle.
// Timing: combinational grant; arbiter pointers move at the clock edge.
// The lint tool reports circular logic (UNOPTFLAT) through the arbiters'
// grant index vectors: it tracks the packed per-output arrays as whole signals. The
// path is not a real loop, since no grant feeds back into a request of the
// same cycle; it only costs simulation speed.
module apcr_vc_alloc
  import apcr_pkg::*;
(
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic  [NUM_PORTS-1:0][NUM_VC-1:0]      va_req,
  input  port_e [NUM_PORTS-1:0][NUM_VC-1:0]      va_port,
  input  logic  [NUM_PORTS-1:0][NUM_VC-1:0]      out_free,
  output logic  [NUM_PORTS-1:0][NUM_VC-1:0]      va_grant,
  output logic  [NUM_PORTS-1:0][NUM_VC-1:0][VC_W-1:0] va_vc,
  output logic  [NUM_PORTS-1:0][NUM_VC-1:0]      alloc
);
  localparam int unsigned NV  = NUM_PORTS * NUM_VC;
  localparam int unsigned NIW = $clog2(NV + 1);

  logic [NUM_PORTS-1:0][NV-1:0]  o_req, o_gnt;
  logic [NUM_PORTS-1:0][NIW-1:0] o_idx;
  logic [NUM_PORTS-1:0]          o_any;
  logic [NUM_PORTS-1:0]          o_has_free;
  logic [NUM_PORTS-1:0][VC_W-1:0] o_free_vc;

  always_comb begin
    for (int o = 0; o < NUM_PORTS; o++) begin
      o_has_free[o] = 1'b0;
      o_free_vc[o]  = '0;
      for (int v = NUM_VC - 1; v >= 0; v--) begin
        if (out_free[o][v]) begin
          o_has_free[o] = 1'b1;
          o_free_vc[o]  = VC_W'(v);
        end
      end
      for (int i = 0; i < NUM_PORTS; i++)
        for (int v = 0; v < NUM_VC; v++)
          o_req[o][i*NUM_VC + v] = o_has_free[o] && va_req[i][v] &&
                                   (va_port[i][v] == port_e'(o));
    end
  end

  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_out
    apcr_rr_arbiter #(.N(NV)) u_arb (
      .clk, .rst_n, .req(o_req[o]), .advance(1'b1),
      .grant(o_gnt[o]), .grant_idx(o_idx[o]), .any(o_any[o])
    );
  end

  always_comb begin
    int w;
    w = 0;
    va_grant = '0;
    va_vc    = '0;
    alloc    = '0;
    for (int o = 0; o < NUM_PORTS; o++) begin
      if (o_any[o]) begin
        w = int'(o_idx[o]);
        va_grant[w / NUM_VC][w % NUM_VC] = 1'b1;
        va_vc[w / NUM_VC][w % NUM_VC]    = o_free_vc[o];
        alloc[o][o_free_vc[o]]           = 1'b1;
      end
    end
  end

endmodule
