// apcr_vc_buffer: the flit FIFO of one virtual channel, built as a parallel
// (circular) FIFO with head, tail and packet pointers.
//
// The read port is as wide as the output link: every cycle the window of
// NUM_SUB flits starting at the head is read out (rd_flits). The regulator then
// decides how many of them are really sent (adv_n); the head moves by that many
// and the other read-out flits are simply dropped, to be read again next cycle.
// The write port is also link-wide: up to NUM_SUB flits (wr_n, oldest first in
// wr_flits) are written at the tail in one cycle.
//
// The packet pointer marks the last flit of the packet at the head: it points
// at the first tail flit found from the head. `run` is the number of flits from
// the head up to and including that flit, capped at NUM_SUB and at the flits
// present. It is what a VC may send at most in one cycle, since flits of
// different packets may not leave together. The paper gives head/tail/packet
// pointers and the read-and-drop scheme; finding the packet end with a
// combinational search over the stored flit types, and keeping an occupancy
// counter to tell full from empty, are this design's choices.
//
// Timing: rd_flits, run, count and pkt_ptr are combinational from registers;
// writes and head advance take effect at the clock edge. Active-low async reset
// empties the buffer.
module apcr_vc_buffer
  import apcr_pkg::*;
#(
  parameter int unsigned DEPTH = apcr_pkg::VC_DEPTH
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // write side (from the input demux)
  input  logic [CNT_W-1:0]              wr_n,
  input  flit_t [NUM_SUB-1:0]           wr_flits,
  // read side (to the output MUX)
  output flit_t [NUM_SUB-1:0]           rd_flits,
  output logic  [CNT_W-1:0]             run,
  input  logic  [CNT_W-1:0]             adv_n,
  // status
  output logic  [$clog2(DEPTH+1)-1:0]   count,
  output logic  [$clog2(DEPTH)-1:0]     head_ptr,
  output logic  [$clog2(DEPTH)-1:0]     tail_ptr,
  output logic  [$clog2(DEPTH)-1:0]     pkt_ptr,
  output logic                          pkt_end_valid
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  flit_t [DEPTH-1:0] mem_q;
  logic  [PW-1:0]    head_q, tail_q;
  logic  [CW-1:0]    count_q;

  function automatic logic [PW-1:0] wrap(int unsigned a);
    return PW'(a % DEPTH);
  endfunction

  assign count    = count_q;
  assign head_ptr = head_q;
  assign tail_ptr = tail_q;

  // Phit-wide read window and packet pointer search.
  always_comb begin
    int unsigned lim;
    pkt_ptr       = head_q;
    pkt_end_valid = 1'b0;
    lim = (int'(count_q) < NUM_SUB) ? int'(count_q) : NUM_SUB;
    run = CNT_W'(lim);
    for (int unsigned j = 0; j < NUM_SUB; j++) begin
      rd_flits[j] = mem_q[wrap(int'(head_q) + j)];
    end
    for (int unsigned j = 0; j < DEPTH; j++) begin
      if (!pkt_end_valid && j < int'(count_q) &&
          is_tail(mem_q[wrap(int'(head_q) + j)].ftype)) begin
        pkt_end_valid = 1'b1;
        pkt_ptr       = wrap(int'(head_q) + j);
        if (j + 1 < lim) run = CNT_W'(j + 1);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head_q  <= '0;
      tail_q  <= '0;
      count_q <= '0;
    end else begin
      head_q  <= wrap(int'(head_q) + int'(adv_n));
      tail_q  <= wrap(int'(tail_q) + int'(wr_n));
      count_q <= CW'(int'(count_q) + int'(wr_n) - int'(adv_n));
    end
  end

  // Storage needs no reset: only entries below count_q are ever used.
  always_ff @(posedge clk) begin
    for (int unsigned j = 0; j < NUM_SUB; j++) begin
      if (j < int'(wr_n)) mem_q[wrap(int'(tail_q) + j)] <= wr_flits[j];
    end
  end

  // Flow-control rules: never send more than the packet at the head allows,
  // never write past the free space.
  a_adv_within_run: assert property (@(posedge clk) disable iff (!rst_n) adv_n <= run)
    else $error("vc_buffer: advance %0d beyond run %0d", adv_n, run);
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  int'(count_q) + int'(wr_n) <= DEPTH)
    else $error("vc_buffer: overflow, count %0d write %0d", count_q, wr_n);

endmodule
