// tb_apcr_rr_arbiter: random requests against a reference round-robin model.
// The model keeps its own priority pointer and must agree with the arbiter's
// one-hot grant, index and `any` every cycle; the pointer only moves when
// `advance` is high.
module tb_apcr_rr_arbiter;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, grant;
  logic [$clog2(N+1)-1:0] grant_idx;
  logic any, advance;
  int checks = 0, failures = 0;
  int ptr, exp_idx, cyc = 0;

  apcr_rr_arbiter #(.N(N)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin : watchdog
    wait (cyc == 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0; advance = 0; ptr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      req = N'($urandom);
      if (t % 7 == 0) req = '0;
      advance = ($urandom % 4) != 0;
      #1;
      exp_idx = -1;
      for (int k = 0; k < N; k++)
        if (exp_idx < 0 && req[(ptr + k) % N]) exp_idx = (ptr + k) % N;
      checks++;
      if (exp_idx < 0) begin
        if (any || grant != '0) begin failures++; $display("t=%0d spurious grant", t); end
      end else if (!any || grant != (N'(1) << exp_idx) || int'(grant_idx) != exp_idx) begin
        failures++;
        $display("t=%0d req=%b ptr=%0d exp=%0d got grant=%b idx=%0d", t, req, ptr, exp_idx, grant, grant_idx);
      end
      @(posedge clk);
      if (advance && exp_idx >= 0) ptr = (exp_idx + 1) % N;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
