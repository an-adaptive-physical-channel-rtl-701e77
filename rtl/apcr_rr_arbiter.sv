// apcr_rr_arbiter: N:1 round-robin arbiter.
//
// Grants the first requester at or after the priority pointer, searching
// upwards with wrap-around. The grant is combinational in the same cycle as the
// request. When `advance` is high, the pointer moves to just past the granted
// requester at the next clock edge, so the winner gets the lowest priority next
// time. The paper names round robin as its scheduling policy; the pointer
// update rule and reset to index 0 are this design's choices.
//
// Interface: req[N] in, grant[N] one-hot out, grant_idx, any (some grant).
// Timing: grant is combinational; pointer is registered (async active-low reset).
module apcr_rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [N-1:0]               req,
  input  logic                       advance,
  output logic [N-1:0]               grant,
  output logic [$clog2(N+1)-1:0]     grant_idx,
  output logic                       any
);
  localparam int unsigned IW = $clog2(N+1);

  logic [IW-1:0] ptr_q;

  int unsigned idx;
  always_comb begin
    idx       = 0;
    grant     = '0;
    grant_idx = '0;
    any       = 1'b0;
    for (int unsigned k = 0; k < N; k++) begin
      idx = (int'(ptr_q) + k) % N;
      if (!any && req[idx]) begin
        any         = 1'b1;
        grant[idx]  = 1'b1;
        grant_idx   = IW'(idx);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr_q <= '0;
    else if (advance && any) ptr_q <= (grant_idx == IW'(N - 1)) ? '0 : grant_idx + 1'b1;
  end

endmodule
