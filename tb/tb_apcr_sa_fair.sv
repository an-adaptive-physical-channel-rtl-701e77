// tb_apcr_sa_fair: checks of the switch allocator apcr_sa_fair.
// Common checks on random requests: sub-channel owners agree with grant_n,
// no VC gets more than it wants or anything it did not ask for, no input port
// sends more than NUM_SUB flits, and every sub-channel goes to a VC that asked
// for that output.
// Fair-sharing: sub-channel k only ever carries VC k mod NUM_VC, a VC sends at
// most one flit, and sub-channel k of an output is used whenever some input's
// VC k asks for that output. Scenario of Fig. 4: VC0 (2 flits) and VC1 (3
// flits) send one flit each; sub-channels 2 and 3 stay empty.
module tb_apcr_sa_fair;
  import apcr_pkg::*;
  logic clk = 0, rst_n = 0;
  logic  [NUM_PORTS-1:0][NUM_VC-1:0]        req;
  port_e [NUM_PORTS-1:0][NUM_VC-1:0]        req_port;
  logic  [NUM_PORTS-1:0][NUM_VC-1:0][CNT_W-1:0] want, grant_n;
  logic  [NUM_PORTS-1:0][NUM_SUB-1:0]       sel_valid;
  logic  [NUM_PORTS-1:0][NUM_SUB-1:0][PORT_W-1:0] sel_in;
  logic  [NUM_PORTS-1:0][NUM_SUB-1:0][VC_W-1:0]   sel_vc;

  int checks = 0, failures = 0, cyc = 0;

  apcr_sa_fair dut (.clk, .rst_n, .req, .req_port, .want, .grant_n, .sel_valid, .sel_in, .sel_vc);

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

  function automatic int total_to(int o);
    int n;
    n = 0;
    for (int k = 0; k < NUM_SUB; k++) n += sel_valid[o][k];
    return n;
  endfunction

  // checks shared by all regulation schemes
  task automatic common_checks();
    int cnt [NUM_PORTS][NUM_VC];
    int used [NUM_PORTS];
    for (int i = 0; i < NUM_PORTS; i++) begin
      used[i] = 0;
      for (int v = 0; v < NUM_VC; v++) cnt[i][v] = 0;
    end
    for (int o = 0; o < NUM_PORTS; o++)
      for (int k = 0; k < NUM_SUB; k++)
        if (sel_valid[o][k]) begin
          int i, v;
          i = int'(sel_in[o][k]); v = int'(sel_vc[o][k]);
          cnt[i][v]++;
          used[i]++;
          checks++;
          if (!req[i][v] || req_port[i][v] != port_e'(o))
            fail($sformatf("out %0d sub %0d to non-requester %0d.%0d", o, k, i, v));
        end
    for (int i = 0; i < NUM_PORTS; i++) begin
      checks++;
      if (used[i] > NUM_SUB) fail($sformatf("input %0d sends %0d flits", i, used[i]));
      for (int v = 0; v < NUM_VC; v++) begin
        checks++;
        if (cnt[i][v] != int'(grant_n[i][v]))
          fail($sformatf("grant_n %0d.%0d=%0d but %0d sub-channels", i, v, grant_n[i][v], cnt[i][v]));
        if (grant_n[i][v] > want[i][v]) fail($sformatf("VC %0d.%0d over-granted", i, v));
      end
    end
  endtask

  task automatic scheme_checks();
    for (int o = 0; o < NUM_PORTS; o++)
      for (int k = 0; k < NUM_SUB; k++) begin
        int asked;
        asked = 0;
        for (int i = 0; i < NUM_PORTS; i++)
          if (req[i][k % NUM_VC] && req_port[i][k % NUM_VC] == port_e'(o) && want[i][k % NUM_VC] > k / NUM_VC) asked = 1;
        checks++;
        if (sel_valid[o][k] != asked) fail($sformatf("fair: out %0d sub %0d used=%0d asked=%0d", o, k, sel_valid[o][k], asked));
        if (sel_valid[o][k] && int'(sel_vc[o][k]) != k % NUM_VC) fail("fair: sub-channel carries a foreign VC");
      end
  endtask

  task automatic clear();
    req = '0; req_port = '0; want = '0;
  endtask

  initial begin
    clear();
    repeat (2) @(posedge clk);
    rst_n = 1;
    // ---- scenario from the paper's figures, input port 1 to the east ----
    @(negedge clk);
    clear();
    req[1][0] = 1; req_port[1][0] = PORT_EAST; want[1][0] = 2;
    req[1][1] = 1; req_port[1][1] = PORT_EAST; want[1][1] = 3;
    #1;
    checks++;
    if (grant_n[1][0] != 1 || grant_n[1][1] != 1 || sel_valid[PORT_EAST] != 4'b0011)
      fail("fig4: fair-sharing should send one flit each on sub-channels 0 and 1");
    // ---- random requests ----
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      for (int i = 0; i < NUM_PORTS; i++)
        for (int v = 0; v < NUM_VC; v++) begin
          req[i][v]      = ($urandom % 3) != 0;
          req_port[i][v] = port_e'($urandom_range(0, NUM_PORTS - 1));
          want[i][v]     = req[i][v] ? CNT_W'($urandom_range(1, NUM_SUB)) : '0;
        end
      #1;
      common_checks();
      scheme_checks();
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
