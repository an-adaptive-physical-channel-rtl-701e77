// tb_apcr_vc_buffer: random multi-flit writes and partial reads of one VC
// buffer against a queue model. Every cycle the read window, the occupancy
// and the run (flits up to the first tail, capped at the link width) are
// compared with the model. Reads advance by a random amount up to run, so
// read-out flits are often dropped and must show up again next cycle.
// Includes the case of the paper's example: M T | H' M' in one VC gives run 2.
module tb_apcr_vc_buffer;
  import apcr_pkg::*;
  localparam int D = 4;
  logic clk = 0, rst_n = 0;
  logic  [CNT_W-1:0] wr_n, adv_n, run;
  flit_t [NUM_SUB-1:0] wr_flits, rd_flits;
  logic [$clog2(D+1)-1:0] count;
  logic [$clog2(D)-1:0] head_ptr, tail_ptr, pkt_ptr;
  logic pkt_end_valid;
  int checks = 0, failures = 0, cyc = 0, drops = 0;
  flit_t q[$];
  int serial = 0;

  apcr_vc_buffer #(.DEPTH(D)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin : watchdog
    wait (cyc == 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic flit_t mk(flit_type_e t);
    flit_t f;
    f = '0;
    f.ftype = t;
    f.data  = FLIT_W'(serial);
    serial++;
    return f;
  endfunction

  task automatic check_state(string tag);
    int exp_run, lim;
    lim = (q.size() < NUM_SUB) ? q.size() : NUM_SUB;
    exp_run = lim;
    for (int j = 0; j < q.size(); j++)
      if (is_tail(q[j].ftype)) begin
        if (j + 1 < exp_run) exp_run = j + 1;
        break;
      end
    checks++;
    if (int'(count) != q.size() || int'(run) != exp_run) begin
      failures++;
      $display("%s: count %0d/%0d run %0d/%0d", tag, count, q.size(), run, exp_run);
    end
    for (int j = 0; j < lim; j++) begin
      checks++;
      if (rd_flits[j] != q[j]) begin
        failures++;
        $display("%s: rd_flits[%0d] %h expected %h", tag, j, rd_flits[j].data, q[j].data);
      end
    end
  endtask

  task automatic step(int nw, flit_type_e types[NUM_SUB], int na);
    @(negedge clk);
    wr_n = CNT_W'(nw);
    adv_n = CNT_W'(na);
    wr_flits = '0;
    for (int j = 0; j < nw; j++) wr_flits[j] = mk(types[j]);
    @(posedge clk);
    for (int j = 0; j < na; j++) void'(q.pop_front());
    for (int j = 0; j < nw; j++) q.push_back(wr_flits[j]);
    #1;
  endtask

  initial begin
    flit_type_e ty[NUM_SUB];
    wr_n = '0; adv_n = '0; wr_flits = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1 check_state("reset");
    // Paper example: M, T of one packet then H', M' of the next.
    ty = '{FLIT_BODY, FLIT_TAIL, FLIT_HEAD, FLIT_BODY};
    step(4, ty, 0);
    check_state("example");
    checks++;
    if (run != 2 || !pkt_end_valid || pkt_ptr != 1) begin
      failures++; $display("example: run %0d pkt_ptr %0d", run, pkt_ptr);
    end
    step(0, ty, 2);   // send M and T, H' M' stay
    check_state("example-after");
    step(0, ty, int'(run));
    // random traffic
    for (int t = 0; t < 5000; t++) begin
      int nw, na, freesp;
      #1;
      na = (run == 0) ? 0 : $urandom_range(0, int'(run));
      if (na < int'(run) && q.size() > na) drops++;
      freesp = D - q.size();
      nw = $urandom_range(0, (freesp < NUM_SUB) ? freesp : NUM_SUB);
      for (int j = 0; j < NUM_SUB; j++) ty[j] = flit_type_e'($urandom_range(0, 3));
      step(nw, ty, na);
      check_state("random");
    end
    checks++;
    if (drops == 0) begin failures++; $display("no partial read happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
