// apcr_mesh: a COLS x ROWS 2D mesh of APCR routers (8x8 by default).
//
// Router (x, y) sits at node index y*COLS + x; its east port faces (x+1, y)
// and its south port (x, y+1). Every inter-router link is a phit-wide link of
// NUM_SUB sub-channels with its credit-count return path beside it. Ports at
// the mesh edge are left unconnected (no flits in, no credits back), which XY
// routing never uses. The local port of every router is brought out: a
// processing element injects on local_in and must return credits on
// local_credit_out's counterpart local_credit_in for what it ejects from
// local_out. Head flits injected carry the destination coordinates in their low
// data bits; their route field is ignored, the local input port routes them.
// The mesh size and XY routing are the paper's evaluation network; all
// routers use the same regulation scheme.
module apcr_mesh
  import apcr_pkg::*;
#(
  parameter int unsigned COLS   = 8,
  parameter int unsigned ROWS   = 8,
  parameter scheme_e     SCHEME = SCHEME_CHANNEL_STEALING,
  parameter int unsigned DEPTH  = apcr_pkg::VC_DEPTH
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  link_t   [ROWS*COLS-1:0]     local_in,
  output credit_t [ROWS*COLS-1:0]     local_credit_out,
  output link_t   [ROWS*COLS-1:0]     local_out,
  input  credit_t [ROWS*COLS-1:0]     local_credit_in
);
  localparam int unsigned N = ROWS * COLS;

  link_t   [N-1:0][NUM_PORTS-1:0] r_link_in, r_link_out;
  credit_t [N-1:0][NUM_PORTS-1:0] r_cred_in, r_cred_out;

  for (genvar y = 0; y < ROWS; y++) begin : g_row
    for (genvar x = 0; x < COLS; x++) begin : g_col
      localparam int unsigned ID = y * COLS + x;

      apcr_router #(.SCHEME(SCHEME), .DEPTH(DEPTH)) u_router (
        .clk, .rst_n, .my_x(COORD_W'(x)), .my_y(COORD_W'(y)),
        .link_in(r_link_in[ID]), .credit_out(r_cred_out[ID]),
        .link_out(r_link_out[ID]), .credit_in(r_cred_in[ID])
      );

      // local port
      assign r_link_in[ID][PORT_LOCAL] = local_in[ID];
      assign r_cred_in[ID][PORT_LOCAL] = local_credit_in[ID];
      assign local_out[ID]             = r_link_out[ID][PORT_LOCAL];
      assign local_credit_out[ID]      = r_cred_out[ID][PORT_LOCAL];

      // north neighbour (x, y-1): its south port faces us
      if (y > 0) begin : g_n
        assign r_link_in[ID][PORT_NORTH] = r_link_out[ID-COLS][PORT_SOUTH];
        assign r_cred_in[ID][PORT_NORTH] = r_cred_out[ID-COLS][PORT_SOUTH];
      end else begin : g_n_edge
        assign r_link_in[ID][PORT_NORTH] = '0;
        assign r_cred_in[ID][PORT_NORTH] = '0;
      end
      // south neighbour (x, y+1)
      if (y < ROWS - 1) begin : g_s
        assign r_link_in[ID][PORT_SOUTH] = r_link_out[ID+COLS][PORT_NORTH];
        assign r_cred_in[ID][PORT_SOUTH] = r_cred_out[ID+COLS][PORT_NORTH];
      end else begin : g_s_edge
        assign r_link_in[ID][PORT_SOUTH] = '0;
        assign r_cred_in[ID][PORT_SOUTH] = '0;
      end
      // east neighbour (x+1, y)
      if (x < COLS - 1) begin : g_e
        assign r_link_in[ID][PORT_EAST] = r_link_out[ID+1][PORT_WEST];
        assign r_cred_in[ID][PORT_EAST] = r_cred_out[ID+1][PORT_WEST];
      end else begin : g_e_edge
        assign r_link_in[ID][PORT_EAST] = '0;
        assign r_cred_in[ID][PORT_EAST] = '0;
      end
      // west neighbour (x-1, y)
      if (x > 0) begin : g_w
        assign r_link_in[ID][PORT_WEST] = r_link_out[ID-1][PORT_EAST];
        assign r_cred_in[ID][PORT_WEST] = r_cred_out[ID-1][PORT_EAST];
      end else begin : g_w_edge
        assign r_link_in[ID][PORT_WEST] = '0;
        assign r_cred_in[ID][PORT_WEST] = '0;
      end
    end
  end

endmodule
