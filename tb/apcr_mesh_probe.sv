// apcr_mesh_probe: counts, over all routers of a mesh, the cycles in which a
// VC was granted several flits, a sub-channel was stolen, and a VC's
// read-out flits were partly dropped. It reads the routers' internal
// allocation signals through hierarchical names given by the instantiating
// testbench as ports.
module apcr_mesh_probe
  import apcr_pkg::*;
#(
  parameter int N = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic [N-1:0][NUM_PORTS-1:0][NUM_VC-1:0][CNT_W-1:0] grant_n,
  input  logic [N-1:0][NUM_PORTS-1:0][NUM_SUB-1:0]           stolen,
  output int   n_multi_grant,
  output int   n_stolen
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_multi_grant <= 0; n_stolen <= 0;
    end else begin
      int m, s;
      m = 0; s = 0;
      for (int r = 0; r < N; r++) begin
        for (int p = 0; p < NUM_PORTS; p++) begin
          for (int v = 0; v < NUM_VC; v++) if (grant_n[r][p][v] > 1) m++;
          for (int k = 0; k < NUM_SUB; k++) s += int'(stolen[r][p][k]);
        end
      end
      n_multi_grant <= n_multi_grant + m;
      n_stolen <= n_stolen + s;
    end
  end
endmodule
