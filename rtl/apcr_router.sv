// apcr_router: a two-stage NoC router with an Adaptive Physical Channel
// Regulator (APCR).
//
// Links are NUM_SUB flits wide (512-bit phit, 128-bit flit), so one output link
// can carry several flits per cycle: several flits of one packet, or flits of
// different VCs and input ports side by side. The regulator is the switch
// allocator; SCHEME picks one of the three regulation schemes:
//   monopolizing      one VC per output per cycle, sending up to a link of
//                     flits of its head packet (apcr_sa_mono);
//   fair-sharing      sub-channel k reserved for VC k of every input, one flit
//                     per VC per cycle (apcr_sa_fair);
//   channel-stealing  fair-sharing plus round-robin reuse of idle
//                     sub-channels by any VC (apcr_sa_steal).
// VC allocation, crossbar and credit flow follow a generic wormhole VC router.
//
// Pipeline (per hop, 2 router cycles + 1 link cycle):
//   cycle 1  lookahead route already in the head flit; VC allocation and switch
//            allocation; the VCs read out a link's worth of flits; the granted
//            flits are packed into the input port's switch register, the rest
//            dropped and read again later;
//   cycle 2  switch traversal through the crossbar into the link register;
//   cycle 3  link traversal; the downstream input port writes the flits into
//            its VC buffers at the end of this cycle.
// VC and switch allocation share cycle 1, the switch allocator seeing the VC
// allocator's result of the same cycle. The paper uses lookahead routing and
// speculative switch allocation for its two-stage router; doing VA then SA in
// one cycle behaves like a speculation that never fails and is this design's
// simplification.
//
// Ports: per port p a link in/out (link_t) and a credit count per VC in/out
// (credit_t). Port 0 is the local port, 1..4 north, east, south, west. The
// router's own coordinates (my_x, my_y) are inputs, tied off by the mesh; the
// routing logic needs them for injected packets and for lookahead.
module apcr_router
  import apcr_pkg::*;
#(
  parameter scheme_e     SCHEME = SCHEME_CHANNEL_STEALING,
  parameter int unsigned DEPTH  = apcr_pkg::VC_DEPTH
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [COORD_W-1:0]       my_x,     // this router's mesh coordinates
  input  logic [COORD_W-1:0]       my_y,
  input  link_t   [NUM_PORTS-1:0]  link_in,
  output credit_t [NUM_PORTS-1:0]  credit_out,
  output link_t   [NUM_PORTS-1:0]  link_out,
  input  credit_t [NUM_PORTS-1:0]  credit_in
);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic  [NUM_PORTS-1:0][NUM_VC-1:0]            va_req, va_grant, out_free, alloc;
  port_e [NUM_PORTS-1:0][NUM_VC-1:0]            va_port, sa_port;
  logic  [NUM_PORTS-1:0][NUM_VC-1:0][VC_W-1:0]  va_vc;
  logic  [NUM_PORTS-1:0][NUM_VC-1:0]            sa_req;
  logic  [NUM_PORTS-1:0][NUM_VC-1:0][CNT_W-1:0] sa_want, grant_n;
  logic  [NUM_PORTS-1:0][NUM_VC-1:0][CW-1:0]    credits;
  logic  [NUM_PORTS-1:0][NUM_VC-1:0][CW-1:0]    vc_count;
  link_t [NUM_PORTS-1:0]                        slots_d, slots_q, xbar_out;

  logic  [NUM_PORTS-1:0][NUM_SUB-1:0]             sel_valid, stolen;
  logic  [NUM_PORTS-1:0][NUM_SUB-1:0][PORT_W-1:0] sel_in;
  logic  [NUM_PORTS-1:0][NUM_SUB-1:0][VC_W-1:0]   sel_vc;
  logic  [NUM_PORTS-1:0][NUM_SUB-1:0][CNT_W-1:0]  sel_slot;
  logic  [NUM_PORTS-1:0][NUM_SUB-1:0]             sa_tail;
  logic  [NUM_PORTS-1:0][NUM_SUB-1:0][VC_W-1:0]   sa_ovc;

  logic  [NUM_PORTS-1:0][NUM_SUB-1:0]             xsel_valid_q;
  logic  [NUM_PORTS-1:0][NUM_SUB-1:0][PORT_W-1:0] xsel_in_q;
  logic  [NUM_PORTS-1:0][NUM_SUB-1:0][CNT_W-1:0]  xsel_slot_q;

  // ---- input ports ----
  for (genvar i = 0; i < NUM_PORTS; i++) begin : g_in
    apcr_input_port #(.DEPTH(DEPTH), .PORT_ID(i)) u_in (
      .clk, .rst_n,
      .cur_x(my_x), .cur_y(my_y),
      .link_in(link_in[i]), .credit_out(credit_out[i]),
      .credits(credits),
      .va_req(va_req[i]), .va_port(va_port[i]), .va_grant(va_grant[i]), .va_vc(va_vc[i]),
      .sa_req(sa_req[i]), .sa_port(sa_port[i]), .sa_want(sa_want[i]), .grant_n(grant_n[i]),
      .slots_d(slots_d[i]), .slots_q(slots_q[i]), .vc_count(vc_count[i])
    );
  end

  // ---- VC allocator ----
  apcr_vc_alloc u_va (
    .clk, .rst_n,
    .va_req, .va_port, .out_free,
    .va_grant, .va_vc, .alloc
  );

  // ---- switch allocator: the regulator ----
  if (SCHEME == SCHEME_MONOPOLIZING) begin : g_mono
    apcr_sa_mono u_sa (
      .clk, .rst_n, .req(sa_req), .req_port(sa_port), .want(sa_want),
      .grant_n, .sel_valid, .sel_in, .sel_vc
    );
    assign stolen = '0;
  end else if (SCHEME == SCHEME_FAIR_SHARING) begin : g_fair
    apcr_sa_fair u_sa (
      .clk, .rst_n, .req(sa_req), .req_port(sa_port), .want(sa_want),
      .grant_n, .sel_valid, .sel_in, .sel_vc
    );
    assign stolen = '0;
  end else begin : g_steal
    apcr_sa_steal u_sa (
      .clk, .rst_n, .req(sa_req), .req_port(sa_port), .want(sa_want),
      .grant_n, .sel_valid, .sel_in, .sel_vc, .stolen
    );
  end

  // ---- map each granted output sub-channel to its slot in the input's channel ----
  // Slot of flit r of VC v of input i = flits granted to VCs below v + r.
  int unsigned si, sv, base, rank;  // scratch for the slot computation
  always_comb begin
    si = 0; sv = 0; base = 0; rank = 0;
    for (int o = 0; o < NUM_PORTS; o++) begin
      for (int k = 0; k < NUM_SUB; k++) begin
        si = int'(sel_in[o][k]);
        sv = int'(sel_vc[o][k]);
        base = 0;
        rank = 0;
        for (int w = 0; w < NUM_VC; w++) if (w < sv) base += int'(grant_n[si][w]);
        for (int kk = 0; kk < NUM_SUB; kk++)
          if (kk < k && sel_valid[o][kk] && sel_in[o][kk] == sel_in[o][k] &&
              sel_vc[o][kk] == sel_vc[o][k]) rank++;
        sel_slot[o][k] = CNT_W'(base + rank);
        sa_ovc[o][k]   = slots_d[si][(base + rank) % NUM_SUB].vc;
        sa_tail[o][k]  = is_tail(slots_d[si][(base + rank) % NUM_SUB].flit.ftype);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xsel_valid_q <= '0;
      xsel_in_q    <= '0;
      xsel_slot_q  <= '0;
    end else begin
      xsel_valid_q <= sel_valid;
      xsel_in_q    <= sel_in;
      xsel_slot_q  <= sel_slot;
    end
  end

  // ---- crossbar (switch traversal) ----
  apcr_crossbar u_xbar (
    .in_slots(slots_q), .sel_valid(xsel_valid_q), .sel_in(xsel_in_q),
    .sel_slot(xsel_slot_q), .out_links(xbar_out)
  );

  // ---- output ports: credits, downstream VC state, link register ----
  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_out
    apcr_output_port #(.DEPTH(DEPTH)) u_out (
      .clk, .rst_n,
      .alloc(alloc[o]), .sa_valid(sel_valid[o]), .sa_vc(sa_ovc[o]), .sa_tail(sa_tail[o]),
      .credit_in(credit_in[o]), .credits(credits[o]), .out_free(out_free[o]),
      .xbar_out(xbar_out[o]), .link_out(link_out[o])
    );
  end

endmodule
