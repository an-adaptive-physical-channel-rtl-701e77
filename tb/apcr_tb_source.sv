// apcr_tb_source: traffic source driving one link into a router, playing the
// upstream router (or the network interface of a processing element).
//
// With probability RATE/1000 per cycle it creates a packet, 60% of them one
// flit long (control) and 40% five flits long (data), until NPKT packets.
// Destinations are drawn so that the packet really travels through this link
// under XY routing: from the local port any node of the mesh, from a
// neighbour only nodes that lie ahead. Each packet takes a free VC of the
// receiving port and is sent with credit-based flow control, up to NUM_SUB
// flits per cycle shared round robin among the VCs, oldest flit first.
// Head flits from a neighbour carry the lookahead route of the receiving
// router. Payload: dest (x, y), source id, packet number, flit index, length,
// injection cycle, so the sink can check everything.
module apcr_tb_source
  import apcr_pkg::*;
#(
  parameter int COLS = 3, parameter int ROWS = 3,
  parameter int RX = 1, parameter int RY = 1,     // receiving router
  parameter int FROM = 0,                         // its input port
  parameter int DEPTH = 4,
  parameter int NPKT = 100,
  parameter int RATE = 300,                       // packets per 1000 cycles
  parameter int SRC_ID = 0,
  parameter int FIXED_DX = -1, parameter int FIXED_DY = -1
) (
  input  logic    clk,
  input  logic    rst_n,
  output link_t   link,
  input  credit_t credit,
  output int      made,
  output int      flits_sent,
  output logic    done,
  output logic    credits_home
);
  typedef struct { int dx, dy, len, id, born; } pkt_t;
  pkt_t pend[$];
  pkt_t cur [NUM_VC];
  bit   busy [NUM_VC];
  int   nxt [NUM_VC];
  int   cred [NUM_VC];
  int   cyc, rr;

  function automatic port_e xy(int cx, int cy, int dx, int dy);
    if (dx != cx) return (dx > cx) ? PORT_EAST : PORT_WEST;
    if (dy != cy) return (dy > cy) ? PORT_SOUTH : PORT_NORTH;
    return PORT_LOCAL;
  endfunction

  function automatic pkt_t new_pkt();
    pkt_t p;
    p.id   = made;
    p.born = cyc;
    p.len  = ($urandom % 10 < 6) ? 1 : 5;
    case (FROM)
      int'(PORT_WEST):  begin p.dx = $urandom_range(RX, COLS - 1); p.dy = $urandom_range(0, ROWS - 1); end
      int'(PORT_EAST):  begin p.dx = $urandom_range(0, RX);        p.dy = $urandom_range(0, ROWS - 1); end
      int'(PORT_NORTH): begin p.dx = RX; p.dy = $urandom_range(RY, ROWS - 1); end
      int'(PORT_SOUTH): begin p.dx = RX; p.dy = $urandom_range(0, RY); end
      default:          begin p.dx = $urandom_range(0, COLS - 1);  p.dy = $urandom_range(0, ROWS - 1); end
    endcase
    if (FIXED_DX >= 0) p.dx = FIXED_DX;
    if (FIXED_DY >= 0) p.dy = FIXED_DY;
    return p;
  endfunction

  function automatic flit_t mk_flit(pkt_t p, int idx);
    flit_t f;
    f = '0;
    if (p.len == 1)          f.ftype = FLIT_HEADTAIL;
    else if (idx == 0)       f.ftype = FLIT_HEAD;
    else if (idx == p.len-1) f.ftype = FLIT_TAIL;
    else                     f.ftype = FLIT_BODY;
    f.route = (FROM == int'(PORT_LOCAL)) ? PORT_LOCAL : xy(RX, RY, p.dx, p.dy);
    f.data[3:0]   = 4'(p.dx);
    f.data[7:4]   = 4'(p.dy);
    f.data[15:8]  = 8'(SRC_ID);
    f.data[31:16] = 16'(p.id);
    f.data[39:32] = 8'(idx);
    f.data[47:40] = 8'(p.len);
    f.data[79:48] = 32'(p.born);
    return f;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      link <= '0;
      made <= 0; flits_sent <= 0; cyc <= 0; rr <= 0;
      done <= 1'b0;
      credits_home <= 1'b1;
      pend.delete();
      for (int v = 0; v < NUM_VC; v++) begin busy[v] = 0; cred[v] = DEPTH; nxt[v] = 0; end
    end else begin
      link_t l;
      int slot, n_made, fs;
      bit home;
      cyc <= cyc + 1;
      l = '0;
      n_made = made;
      fs = flits_sent;
      for (int v = 0; v < NUM_VC; v++) cred[v] += int'(credit[v]);
      if (n_made < NPKT && $urandom_range(0, 999) < RATE) begin
        pend.push_back(new_pkt());
        n_made++;
      end
      for (int v = 0; v < NUM_VC; v++)
        if (!busy[v] && pend.size() > 0) begin
          cur[v] = pend.pop_front();
          busy[v] = 1; nxt[v] = 0;
        end
      slot = 0;
      for (int s = 0; s < NUM_VC; s++) begin
        int v;
        v = (rr + s) % NUM_VC;
        while (busy[v] && cred[v] > 0 && slot < NUM_SUB) begin
          l[slot].valid = 1'b1;
          l[slot].vc    = VC_W'(v);
          l[slot].flit  = mk_flit(cur[v], nxt[v]);
          slot++; fs++;
          cred[v]--;
          nxt[v]++;
          if (nxt[v] == cur[v].len) busy[v] = 0;
        end
      end
      rr <= (rr + 1) % NUM_VC;
      link <= l;
      made <= n_made;
      flits_sent <= fs;
      home = 1;
      for (int v = 0; v < NUM_VC; v++) if (cred[v] != DEPTH || busy[v]) home = 0;
      credits_home <= home;
      done <= (n_made == NPKT) && pend.size() == 0 && home;
    end
  end
endmodule
