// apcr_sa_steal: switch allocator with the Channel-stealing regulation scheme.
//
// Built on fair-sharing. First every output sub-channel is offered to the VC
// it is bound to (sub-channel k to VC k mod NUM_VC), with a round-robin p:1
// arbiter per sub-channel choosing among the input ports, exactly as in
// apcr_sa_fair. Then every sub-channel that is still free is stolen: it can go
// to any VC of any input port that requests the same output and still has
// flits it was not granted. The free sub-channels of an output are handed out
// in ascending order by a round-robin scan over all p*v input VCs, starting at
// a per-output pointer and continuing after the last VC served, so the extra
// sub-channels are spread over the VCs that have more flits. Together the two
// passes act as one p*v:1 choice per output sub-channel.
//
// An input port reaches the crossbar over one link-wide channel, so no input
// port is granted more than NUM_SUB flits in a cycle in total; the stealing
// pass checks this, going over the output ports in order. The two-pass
// structure, the scan order and this budget check are this design's reading of
// the paper, which gives the policy (stealing, round robin) but not the logic.
//
// Interface and timing as apcr_sa_mono.
module apcr_sa_steal
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
  output logic  [NUM_PORTS-1:0][NUM_SUB-1:0][VC_W-1:0]   sel_vc,
  // sub-channels given away by the stealing pass this cycle (for statistics)
  output logic  [NUM_PORTS-1:0][NUM_SUB-1:0]       stolen
);
  localparam int unsigned PIW = $clog2(NUM_PORTS + 1);
  localparam int unsigned NV  = NUM_PORTS * NUM_VC;
  localparam int unsigned RW  = $clog2(NV);

  logic [NUM_PORTS-1:0][NUM_SUB-1:0][NUM_PORTS-1:0] sc_req, sc_gnt;
  logic [NUM_PORTS-1:0][NUM_SUB-1:0][PIW-1:0]       sc_idx;
  logic [NUM_PORTS-1:0][NUM_SUB-1:0]                sc_any;
  logic [NUM_PORTS-1:0][RW-1:0]                     ptr_q, ptr_d;

  // ---- pass 1: fair-sharing on bound sub-channels ----
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

  // ---- pass 2: steal the sub-channels left free ----
  always_comb begin
    logic [NUM_PORTS-1:0][7:0] in_used;  // flits granted per input port
    int unsigned i, v, idx, pos;
    logic        found;
    i = 0; v = 0; idx = 0; pos = 0; found = 1'b0;
    grant_n   = '0;
    sel_valid = '0;
    sel_in    = '0;
    sel_vc    = '0;
    stolen    = '0;
    ptr_d     = ptr_q;
    in_used   = '0;

    for (int o = 0; o < NUM_PORTS; o++) begin
      for (int k = 0; k < NUM_SUB; k++) begin
        if (sc_any[o][k]) begin
          i = int'(sc_idx[o][k]);
          sel_valid[o][k] = 1'b1;
          sel_in[o][k]    = PORT_W'(i);
          sel_vc[o][k]    = VC_W'(k % NUM_VC);
          grant_n[i][k % NUM_VC] = grant_n[i][k % NUM_VC] + 1'b1;
          for (int ii = 0; ii < NUM_PORTS; ii++) if (ii == i) in_used[ii] += 8'd1;
        end
      end
    end

    for (int o = 0; o < NUM_PORTS; o++) begin
      pos = int'(ptr_q[o]);
      for (int k = 0; k < NUM_SUB; k++) begin
        if (!sel_valid[o][k]) begin
          found = 1'b0;
          for (int s = 0; s < NV; s++) begin
            idx = (pos + s) % NV;
            i   = idx / NUM_VC;
            v   = idx % NUM_VC;
            if (!found && req[i][v] && req_port[i][v] == port_e'(o) &&
                want[i][v] > grant_n[i][v] && int'(in_used[i]) < NUM_SUB) begin
              found           = 1'b1;
              sel_valid[o][k] = 1'b1;
              sel_in[o][k]    = PORT_W'(i);
              sel_vc[o][k]    = VC_W'(v);
              stolen[o][k]    = 1'b1;
              grant_n[i][v]   = grant_n[i][v] + 1'b1;
              for (int ii = 0; ii < NUM_PORTS; ii++) if (ii == i) in_used[ii] += 8'd1;
              pos             = (idx + 1) % NV;
              ptr_d[o]        = RW'(pos);
            end
          end
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr_q <= '0;
    else        ptr_q <= ptr_d;
  end

endmodule
