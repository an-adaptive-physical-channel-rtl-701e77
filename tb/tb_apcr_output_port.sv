// tb_apcr_output_port: credit counters and downstream-VC state against a
// model. Random flit sends (never beyond the model's credits) and random
// credit returns (never beyond what was consumed); a tail frees its VC and an
// allocation takes a free one. The link register must repeat the crossbar
// output one cycle later.
module tb_apcr_output_port;
  import apcr_pkg::*;
  localparam int D = 4;
  localparam int CW = $clog2(D + 1);
  logic clk = 0, rst_n = 0;
  logic [NUM_VC-1:0] alloc, out_free;
  logic [NUM_SUB-1:0] sa_valid, sa_tail;
  logic [NUM_SUB-1:0][VC_W-1:0] sa_vc;
  credit_t credit_in;
  logic [NUM_VC-1:0][CW-1:0] credits;
  link_t xbar_out, link_out, prev_xbar;
  int checks = 0, failures = 0, cyc = 0;
  int cred [NUM_VC];
  int owed [NUM_VC];
  bit busy [NUM_VC];

  apcr_output_port #(.DEPTH(D)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin : watchdog
    wait (cyc == 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alloc = '0; sa_valid = '0; sa_tail = '0; sa_vc = '0; credit_in = '0; xbar_out = '0;
    for (int v = 0; v < NUM_VC; v++) begin cred[v] = D; owed[v] = 0; busy[v] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      int left [NUM_VC];
      @(negedge clk);
      for (int v = 0; v < NUM_VC; v++) left[v] = cred[v];
      sa_valid = '0; sa_tail = '0; sa_vc = '0; alloc = '0;
      for (int k = 0; k < NUM_SUB; k++) begin
        int v;
        v = $urandom_range(0, NUM_VC - 1);
        if (left[v] > 0 && $urandom_range(0, 1)) begin
          left[v]--;
          sa_valid[k] = 1; sa_vc[k] = VC_W'(v); sa_tail[k] = ($urandom % 5) == 0;
        end
      end
      for (int v = 0; v < NUM_VC; v++) begin
        int r;
        r = (owed[v] > 0) ? $urandom_range(0, (owed[v] < NUM_SUB) ? owed[v] : NUM_SUB) : 0;
        credit_in[v] = CNT_W'(r);
        if (!busy[v] && ($urandom % 3) == 0) alloc[v] = 1;
      end
      prev_xbar = xbar_out;
      xbar_out = '0;
      for (int k = 0; k < NUM_SUB; k++) begin
        xbar_out[k].valid = $urandom_range(0, 1);
        xbar_out[k].flit.data = {4{$urandom}};
      end
      @(posedge clk);
      for (int v = 0; v < NUM_VC; v++) begin
        int used; bit rel;
        used = 0; rel = 0;
        for (int k = 0; k < NUM_SUB; k++) if (sa_valid[k] && int'(sa_vc[k]) == v) begin used++; rel |= sa_tail[k]; end
        cred[v] += int'(credit_in[v]) - used;
        owed[v] += used - int'(credit_in[v]);
        busy[v] = (busy[v] | alloc[v]) & !rel;
      end
      #1;
      for (int v = 0; v < NUM_VC; v++) begin
        checks++;
        if (int'(credits[v]) != cred[v] || out_free[v] != !busy[v]) begin
          failures++;
          if (failures < 10) $display("t=%0d VC %0d credits %0d/%0d free %0d/%0d", t, v, credits[v], cred[v], out_free[v], !busy[v]);
        end
      end
      checks++;
      if (link_out != xbar_out) begin failures++; $display("t=%0d link register wrong", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
