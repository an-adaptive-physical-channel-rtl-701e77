// tb_apcr_sa_mono: checks of the switch allocator apcr_sa_mono.
// Common checks on random requests: sub-channel owners agree with grant_n,
// no VC gets more than it wants or anything it did not ask for, no input port
// sends more than NUM_SUB flits, and every sub-channel goes to a VC that asked
// for that output.
// Monopolizing: at most one VC per input port and one VC per output is served,
// the winner gets exactly want flits on sub-channels 0..want-1, and a request
// is always served somewhere. Scenarios of Figs. 2 and 3: a VC whose head
// packet has two flits sends both in one cycle; four VCs of one input with one
// flit each send only one flit, leaving three quarters of the link unused.
module tb_apcr_sa_mono;
  import apcr_pkg::*;
  logic clk = 0, rst_n = 0;
  logic  [NUM_PORTS-1:0][NUM_VC-1:0]        req;
  port_e [NUM_PORTS-1:0][NUM_VC-1:0]        req_port;
  logic  [NUM_PORTS-1:0][NUM_VC-1:0][CNT_W-1:0] want, grant_n;
  logic  [NUM_PORTS-1:0][NUM_SUB-1:0]       sel_valid;
  logic  [NUM_PORTS-1:0][NUM_SUB-1:0][PORT_W-1:0] sel_in;
  logic  [NUM_PORTS-1:0][NUM_SUB-1:0][VC_W-1:0]   sel_vc;

  int checks = 0, failures = 0, cyc = 0;

  apcr_sa_mono dut (.clk, .rst_n, .req, .req_port, .want, .grant_n, .sel_valid, .sel_in, .sel_vc);

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
    int any_req, any_gnt;
    int per_in [NUM_PORTS];
    any_req = 0; any_gnt = 0;
    for (int i = 0; i < NUM_PORTS; i++) begin
      per_in[i] = 0;
      for (int v = 0; v < NUM_VC; v++) begin
        any_req += req[i][v];
        if (grant_n[i][v] != 0) begin
          per_in[i]++;
          any_gnt++;
          checks++;
          if (grant_n[i][v] != want[i][v]) fail("mono: winner not given all its flits");
        end
      end
      checks++;
      if (per_in[i] > 1) fail("mono: two VCs of one input served");
    end
    for (int o = 0; o < NUM_PORTS; o++) begin
      int owner_i, owner_v, n;
      owner_i = -1; owner_v = -1; n = 0;
      for (int k = 0; k < NUM_SUB; k++) begin
        if (sel_valid[o][k]) begin
          n++;
          if (owner_i < 0) begin owner_i = int'(sel_in[o][k]); owner_v = int'(sel_vc[o][k]); end
          checks++;
          if (int'(sel_in[o][k]) != owner_i || int'(sel_vc[o][k]) != owner_v) fail("mono: output shared");
          if (k != n - 1) fail("mono: sub-channels not contiguous from 0");
        end
      end
    end
    checks++;
    if (any_req > 0 && any_gnt == 0) fail("mono: requests but no grant");
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
    req[1][0] = 1; req_port[1][0] = PORT_EAST; want[1][0] = 2;   // M, T (Fig. 2)
    #1;
    checks++;
    if (grant_n[1][0] != 2 || total_to(PORT_EAST) != 2) fail("fig2: expected 2 flits from VC0");
    @(negedge clk);
    clear();
    for (int v = 0; v < NUM_VC; v++) begin
      req[1][v] = 1; req_port[1][v] = PORT_EAST; want[1][v] = 1;  // Fig. 3
    end
    #1;
    checks++;
    if (total_to(PORT_EAST) != 1) fail($sformatf("fig3: expected 1 flit, got %0d", total_to(PORT_EAST)));
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
