// apcr_input_port: one input port of the APCR router.
//
// The incoming link carries up to NUM_SUB flits per cycle, each tagged with the
// VC it is for. The input demux writes them into the VC buffers (apcr_vc_buffer)
// in sub-channel order, so several flits can enter one VC in the same cycle.
// Each VC keeps the state of the packet at its head: whether it holds a
// downstream VC, its output port and that downstream VC.
//
// Requests, per VC:
//   * VC allocation: a head flit at the front of a VC without a downstream VC.
//     Its output port comes from the lookahead route in the flit, or, at the
//     local (injection) port, from routing the destination here.
//   * Switch allocation: a VC that holds a downstream VC, or wins one this
//     cycle, asks to send `want` flits: the flits of its head packet read out
//     this cycle (run), limited by the credits of its downstream VC.
// The regulator answers with grant_n per VC. The output MUX then packs the
// granted flits of all VCs, lowest VC first and oldest flit first, into the
// NUM_SUB slots of the link-wide channel to the crossbar; the flits read out but
// not granted are dropped and read again next cycle. A head flit leaving gets
// its route replaced by the route at the next router (lookahead) and every
// flit gets the downstream VC number. The packed slots are registered (the
// switch-traversal pipeline register) and the freed-flit count per VC is
// registered as the credit returned upstream.
//
// Timing: requests and slots_d are combinational in the allocation cycle;
// slots_q and credit_out are valid the cycle after. The buffers' pointer
// outputs are left open on purpose: the port needs only the read window, the
// run length and the occupancy.
module apcr_input_port
  import apcr_pkg::*;
#(
  parameter int unsigned DEPTH   = apcr_pkg::VC_DEPTH,
  parameter int unsigned PORT_ID = 0,
  localparam int unsigned CW     = $clog2(DEPTH + 1)
) (
  input  logic                                       clk,
  input  logic                                       rst_n,
  input  logic  [COORD_W-1:0]                        cur_x,
  input  logic  [COORD_W-1:0]                        cur_y,
  // link from upstream and credits back to it
  input  link_t                                      link_in,
  output credit_t                                    credit_out,
  // credits of all downstream VCs of this router
  input  logic  [NUM_PORTS-1:0][NUM_VC-1:0][CW-1:0]  credits,
  // VC allocation
  output logic  [NUM_VC-1:0]                         va_req,
  output port_e [NUM_VC-1:0]                         va_port,
  input  logic  [NUM_VC-1:0]                         va_grant,
  input  logic  [NUM_VC-1:0][VC_W-1:0]               va_vc,
  // switch allocation
  output logic  [NUM_VC-1:0]                         sa_req,
  output port_e [NUM_VC-1:0]                         sa_port,
  output logic  [NUM_VC-1:0][CNT_W-1:0]              sa_want,
  input  logic  [NUM_VC-1:0][CNT_W-1:0]              grant_n,
  // packed channel to the crossbar
  output link_t                                      slots_d,
  output link_t                                      slots_q,
  // per-VC occupancy (for observation)
  output logic  [NUM_VC-1:0][CW-1:0]                 vc_count
);
  // ---- input demux ----
  logic  [NUM_VC-1:0][CNT_W-1:0]             wr_n;
  flit_t [NUM_VC-1:0][NUM_SUB-1:0]           wr_flits;

  always_comb begin
    wr_n     = '0;
    wr_flits = '0;
    for (int k = 0; k < NUM_SUB; k++) begin
      if (link_in[k].valid) begin
        wr_flits[link_in[k].vc][wr_n[link_in[k].vc]] = link_in[k].flit;
        wr_n[link_in[k].vc] = wr_n[link_in[k].vc] + 1'b1;
      end
    end
  end

  // ---- VC buffers ----
  flit_t [NUM_VC-1:0][NUM_SUB-1:0] rd_flits;
  logic  [NUM_VC-1:0][CNT_W-1:0]   run;

  for (genvar v = 0; v < NUM_VC; v++) begin : g_vc
    apcr_vc_buffer #(.DEPTH(DEPTH)) u_buf (
      .clk, .rst_n,
      .wr_n(wr_n[v]), .wr_flits(wr_flits[v]),
      .rd_flits(rd_flits[v]), .run(run[v]), .adv_n(grant_n[v]),
      .count(vc_count[v]), .head_ptr(), .tail_ptr(), .pkt_ptr(), .pkt_end_valid()
    );
  end

  // ---- per-VC packet state and routing ----
  logic  [NUM_VC-1:0]           active_q;
  port_e [NUM_VC-1:0]           port_q;
  logic  [NUM_VC-1:0][VC_W-1:0] ovc_q;
  port_e [NUM_VC-1:0]           route_here, route_next, cur_port;
  logic  [NUM_VC-1:0][VC_W-1:0] cur_ovc;

  for (genvar v = 0; v < NUM_VC; v++) begin : g_rc
    apcr_route u_rc (
      .cur_x, .cur_y,
      .dst_x(dest_x(rd_flits[v][0])), .dst_y(dest_y(rd_flits[v][0])),
      .out_port(cur_port[v]),
      .route_here(route_here[v]), .route_next(route_next[v])
    );
  end

  port_e [NUM_VC-1:0]            front_route;
  logic  [NUM_VC-1:0][CNT_W-1:0] want_w;
  logic  [NUM_VC-1:0][CW-1:0]    cred_c;
  logic  [NUM_VC-1:0]            last_is_tail;

  always_comb begin
    front_route = {NUM_VC{PORT_LOCAL}};
    want_w      = '0;
    cred_c      = '0;
    for (int v = 0; v < NUM_VC; v++) begin
      front_route[v] = (PORT_ID == int'(PORT_LOCAL)) ? route_here[v] : rd_flits[v][0].route;
      va_req[v]   = !active_q[v] && (vc_count[v] != '0) && is_head(rd_flits[v][0].ftype);
      va_port[v]  = front_route[v];
      cur_port[v] = active_q[v] ? port_q[v] : front_route[v];
      cur_ovc[v]  = active_q[v] ? ovc_q[v]  : va_vc[v];
      cred_c[v]   = credits[cur_port[v]][cur_ovc[v]];
      want_w[v]   = (int'(cred_c[v]) < int'(run[v])) ? CNT_W'(cred_c[v]) : run[v];
      sa_want[v]  = want_w[v];
      sa_port[v]  = cur_port[v];
      sa_req[v]   = (active_q[v] || va_grant[v]) && (want_w[v] != '0);
    end
  end

  // ---- output MUX: pack granted flits into the link-wide channel ----
  int unsigned s;  // next free slot while packing
  always_comb begin
    s       = 0;
    slots_d = '0;
    last_is_tail = '0;
    for (int v = 0; v < NUM_VC; v++)
      for (int j = 0; j < NUM_SUB; j++)
        if (j < int'(grant_n[v]) && is_tail(rd_flits[v][j].ftype)) last_is_tail[v] = 1'b1;
    for (int v = 0; v < NUM_VC; v++) begin
      for (int j = 0; j < NUM_SUB; j++) begin
        if (j < int'(grant_n[v]) && s < NUM_SUB) begin
          slots_d[s].valid = 1'b1;
          slots_d[s].vc    = cur_ovc[v];
          slots_d[s].flit  = rd_flits[v][j];
          if (is_head(rd_flits[v][j].ftype)) slots_d[s].flit.route = route_next[v];
          s++;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active_q   <= '0;
      port_q     <= {NUM_VC{PORT_LOCAL}};
      ovc_q      <= '0;
      slots_q    <= '0;
      credit_out <= '0;
    end else begin
      slots_q    <= slots_d;
      credit_out <= grant_n;
      for (int v = 0; v < NUM_VC; v++) begin
        if (va_grant[v]) begin
          port_q[v] <= va_port[v];
          ovc_q[v]  <= va_vc[v];
        end
        if (last_is_tail[v])   active_q[v] <= 1'b0;
        else if (va_grant[v])  active_q[v] <= 1'b1;
      end
    end
  end

  // A VC may only be granted flits it asked for; the channel holds NUM_SUB.
  logic grants_ok;
  always_comb begin
    grants_ok = 1'b1;
    for (int v = 0; v < NUM_VC; v++)
      if (grant_n[v] > sa_want[v] || (grant_n[v] != '0 && !sa_req[v])) grants_ok = 1'b0;
  end
  a_grants_requested: assert property (@(posedge clk) disable iff (!rst_n) grants_ok)
    else $error("input_port %0d: a VC was granted flits it did not request", PORT_ID);

endmodule
