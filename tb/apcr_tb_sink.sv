// apcr_tb_sink: receives one output link of a router (the downstream router
// or the processing element) and checks it.
//
// Flits are reassembled per VC: a packet must start with a head, carry
// consecutive flit indices of one source packet and end with its tail. The
// destination must lie in the direction of this output under XY routing, a
// head leaving towards a neighbour must carry the route that neighbour will
// use, and at a local output the destination must be this node. Every flit is
// consumed at once and returned as a credit the next cycle, so a VC may
// never receive more than DEPTH flits in one cycle.
// It also counts cycles in which one VC delivered several flits (multi) and
// cycles in which flits of several VCs shared the link (shared), and the
// packet latency from injection to the head's arrival. At a local output of a
// mesh (COLS > 0) the latency of every head must be at least the zero-load
// value, 3 cycles per router on the path plus 1 for the injection link, and
// heads that meet it exactly are counted.
module apcr_tb_sink
  import apcr_pkg::*;
#(
  parameter int TX = 1, parameter int TY = 1,    // router driving this link
  parameter int PORT = 0,
  parameter int DEPTH = 4,
  parameter int COLS = 0     // >0: sources are mesh nodes with SRC_ID = y*COLS + x
) (
  input  logic    clk,
  input  logic    rst_n,
  input  link_t   link,
  output credit_t credit,
  output int      pkts,
  output int      flits,
  output int      errors,
  output int      checks,
  output int      multi,
  output int      shared,
  output int      lat_min,
  output int      lat_exact    // heads that took exactly the zero-load latency
);
  bit open [NUM_VC];
  int src [NUM_VC], id [NUM_VC], idx [NUM_VC], len [NUM_VC];
  int cyc;

  function automatic port_e xy(int cx, int cy, int dx, int dy);
    if (dx != cx) return (dx > cx) ? PORT_EAST : PORT_WEST;
    if (dy != cy) return (dy > cy) ? PORT_SOUTH : PORT_NORTH;
    return PORT_LOCAL;
  endfunction

  task automatic err(string m);
    errors <= errors + 1;
    $display("sink (%0d,%0d) port %0d cycle %0d: %s", TX, TY, PORT, cyc, m);
  endtask

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      credit <= '0;
      pkts <= 0; flits <= 0; errors <= 0; checks <= 0; multi <= 0; shared <= 0;
      lat_min <= 1 << 30; lat_exact <= 0;
      cyc <= 0;
      for (int v = 0; v < NUM_VC; v++) open[v] = 0;
    end else begin
      credit_t c;
      int per_vc [NUM_VC];
      int nvc, np, nf, nc, lm, le;
      c = '0;
      np = pkts; nf = flits; nc = checks; lm = lat_min; le = lat_exact;
      cyc <= cyc + 1;
      for (int v = 0; v < NUM_VC; v++) per_vc[v] = 0;
      for (int k = 0; k < NUM_SUB; k++) begin
        if (link[k].valid) begin
          flit_t f;
          int v, dx, dy, s, i, n, l;
          f = link[k].flit;
          v = int'(link[k].vc);
          dx = int'(f.data[3:0]); dy = int'(f.data[7:4]);
          s = int'(f.data[15:8]); i = int'(f.data[31:16]);
          n = int'(f.data[39:32]); l = int'(f.data[47:40]);
          per_vc[v]++;
          nf++;
          c[v] = c[v] + 1'b1;
          nc++;
          if (is_head(f.ftype)) begin
            int hops, lat;
            if (open[v]) err("head while a packet is open");
            if (xy(TX, TY, dx, dy) != port_e'(PORT)) err($sformatf("packet to (%0d,%0d) on wrong port", dx, dy));
            if (PORT != int'(PORT_LOCAL)) begin
              int nx, ny;
              nx = TX + (PORT == int'(PORT_EAST)) - (PORT == int'(PORT_WEST));
              ny = TY + (PORT == int'(PORT_SOUTH)) - (PORT == int'(PORT_NORTH));
              if (f.route != xy(nx, ny, dx, dy)) err("wrong lookahead route");
            end
            if (n != 0) err("head with non-zero index");
            open[v] = 1; src[v] = s; id[v] = i; idx[v] = 0; len[v] = l;
            lat = cyc - int'(f.data[79:48]);
            if (lat < lm) lm = lat;
            if (COLS > 0) begin
              int sx, sy, zl;
              sx = s % COLS; sy = s / COLS;
              hops = (dx > sx ? dx - sx : sx - dx) + (dy > sy ? dy - sy : sy - dy);
              zl = 3 * (hops + 1) + 1;
              if (lat < zl) err($sformatf("latency %0d below zero-load %0d", lat, zl));
              if (lat == zl) le++;
            end
          end else begin
            if (!open[v]) err("body/tail without head");
            else if (s != src[v] || i != id[v] || n != idx[v] + 1) err($sformatf("VC %0d out of order: %0d.%0d.%0d after %0d.%0d.%0d", v, s, i, n, src[v], id[v], idx[v]));
            idx[v] = n;
          end
          if (is_tail(f.ftype)) begin
            if (n != len[v] - 1) err("tail at wrong index");
            open[v] = 0;
            np++;
          end
        end
      end
      nvc = 0;
      for (int v = 0; v < NUM_VC; v++) begin
        if (per_vc[v] > 0) nvc++;
        if (per_vc[v] > 1) multi <= multi + 1;
        if (per_vc[v] > DEPTH) err("more flits than credits");
      end
      if (nvc > 1) shared <= shared + 1;
      credit <= c;
      pkts <= np; flits <= nf; checks <= nc; lat_min <= lm; lat_exact <= le;
    end
  end
endmodule
