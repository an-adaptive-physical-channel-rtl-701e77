// tb_apcr_vc_alloc: random VC-allocation requests. Per output port: at most
// one grant, the grant goes to a requester of that port, it receives the
// lowest free downstream VC, alloc marks exactly that VC, and a port with a
// free VC and a requester always grants. Round robin: a requester that keeps
// asking is served within p*v cycles.
module tb_apcr_vc_alloc;
  import apcr_pkg::*;
  logic clk = 0, rst_n = 0;
  logic  [NUM_PORTS-1:0][NUM_VC-1:0] va_req, out_free, va_grant, alloc;
  port_e [NUM_PORTS-1:0][NUM_VC-1:0] va_port;
  logic  [NUM_PORTS-1:0][NUM_VC-1:0][VC_W-1:0] va_vc;
  int checks = 0, failures = 0, cyc = 0;

  apcr_vc_alloc dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin : watchdog
    wait (cyc == 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("cycle %0d: %s", cyc, msg);
  endtask

  task automatic check();
    for (int o = 0; o < NUM_PORTS; o++) begin
      int lowest, asked, ngr;
      lowest = -1; asked = 0; ngr = 0;
      for (int v = NUM_VC - 1; v >= 0; v--) if (out_free[o][v]) lowest = v;
      for (int i = 0; i < NUM_PORTS; i++)
        for (int v = 0; v < NUM_VC; v++) begin
          if (va_req[i][v] && va_port[i][v] == port_e'(o)) asked = 1;
          if (va_grant[i][v] && va_port[i][v] == port_e'(o)) begin
            ngr++;
            checks++;
            if (!va_req[i][v]) fail("grant without request");
            if (int'(va_vc[i][v]) != lowest) fail($sformatf("got VC %0d, lowest free %0d", va_vc[i][v], lowest));
          end
        end
      checks++;
      if (ngr > 1) fail("two grants on one output");
      if (ngr != ((asked && lowest >= 0) ? 1 : 0)) fail($sformatf("out %0d: %0d grants, asked %0d free %0d", o, ngr, asked, lowest));
      for (int v = 0; v < NUM_VC; v++) begin
        checks++;
        if (alloc[o][v] != (ngr == 1 && v == lowest)) fail("alloc mismatch");
      end
    end
  endtask

  initial begin
    int waited;
    va_req = '0; va_port = '0; out_free = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      for (int i = 0; i < NUM_PORTS; i++)
        for (int v = 0; v < NUM_VC; v++) begin
          va_req[i][v]  = $urandom_range(0, 1);
          va_port[i][v] = port_e'($urandom_range(0, NUM_PORTS - 1));
          out_free[i][v] = ($urandom % 4) != 0;
        end
      #1 check();
    end
    // fairness: everyone asks for the east port; VC 2.3 must be served in time
    waited = 0;
    for (int t = 0; t < 40; t++) begin
      @(negedge clk);
      va_req = '1;
      va_port = {NUM_PORTS*NUM_VC{PORT_EAST}};
      out_free = '1;
      #1 check();
      if (va_grant[2][3]) break;
      waited++;
    end
    checks++;
    if (waited >= NUM_PORTS * NUM_VC) fail("round robin starves a requester");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
