// tb_apcr_input_port: directed test of an input port (west port of the router
// at (1,1)), with the allocators played by the testbench.
//  1. A five-flit packet A to (3,1) arrives four flits in one cycle on VC0;
//     then a one-flit packet B to (1,3) on VC1. Both VCs must ask for VC
//     allocation with their lookahead routes (east, south).
//  2. VC0 wins downstream VC2 whose credit is 3: it must want 3 flits. It is
//     granted 2: slots 0,1 carry A0, A1 tagged VC2, A0 with the route of the
//     next router; the next cycle the switch register holds them and 2
//     credits go back for VC0. Same cycle VC1 wins VC1 and is granted B,
//     which must be packed after VC0's flits.
//  3. The tail of A arrives; VC0 (already allocated, no VA request) wants
//     the 3 flits left, is granted them and becomes free again.
module tb_apcr_input_port;
  import apcr_pkg::*;
  localparam int D = 4, CW = $clog2(D + 1);
  logic clk = 0, rst_n = 0;
  link_t link_in, slots_d, slots_q;
  credit_t credit_out;
  logic [NUM_PORTS-1:0][NUM_VC-1:0][CW-1:0] credits;
  logic [NUM_VC-1:0] va_req, va_grant, sa_req;
  port_e [NUM_VC-1:0] va_port, sa_port;
  logic [NUM_VC-1:0][VC_W-1:0] va_vc;
  logic [NUM_VC-1:0][CNT_W-1:0] sa_want, grant_n;
  logic [NUM_VC-1:0][CW-1:0] vc_count;
  int checks = 0, failures = 0, cyc = 0;

  apcr_input_port #(.DEPTH(D), .PORT_ID(int'(PORT_WEST))) dut (
    .clk, .rst_n, .cur_x(COORD_W'(1)), .cur_y(COORD_W'(1)), .*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin : watchdog
    wait (cyc == 1000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic flit_t fl(flit_type_e t, port_e r, int dx, int dy, int tag);
    flit_t f;
    f = '0;
    f.ftype = t; f.route = r;
    f.data[3:0] = 4'(dx); f.data[7:4] = 4'(dy); f.data[47:40] = 8'(tag);
    return f;
  endfunction

  task automatic expect_(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("cycle %0d: FAILED %s", cyc, what); end
  endtask

  flit_t a [5];
  flit_t b;

  initial begin
    a[0] = fl(FLIT_HEAD, PORT_EAST, 3, 1, 10);
    a[1] = fl(FLIT_BODY, PORT_EAST, 3, 1, 11);
    a[2] = fl(FLIT_BODY, PORT_EAST, 3, 1, 12);
    a[3] = fl(FLIT_BODY, PORT_EAST, 3, 1, 13);
    a[4] = fl(FLIT_TAIL, PORT_EAST, 3, 1, 14);
    b    = fl(FLIT_HEADTAIL, PORT_SOUTH, 1, 3, 20);
    link_in = '0; credits = '1; va_grant = '0; va_vc = '0; grant_n = '0;
    for (int p = 0; p < NUM_PORTS; p++) for (int v = 0; v < NUM_VC; v++) credits[p][v] = CW'(D);
    repeat (2) @(posedge clk);
    rst_n = 1;
    // 1. four flits of A on VC0 in one cycle
    @(negedge clk);
    for (int k = 0; k < 4; k++) begin
      link_in[k].valid = 1; link_in[k].vc = 0; link_in[k].flit = a[k];
    end
    @(negedge clk);
    link_in = '0;
    link_in[2].valid = 1; link_in[2].vc = 1; link_in[2].flit = b;
    #1;
    expect_(vc_count[0] == 4, "four flits written in one cycle");
    expect_(va_req[0] && va_port[0] == PORT_EAST, "VC0 asks for VA towards east");
    expect_(!sa_req[0], "no switch request without a VC");
    @(negedge clk);
    link_in = '0;
    // 2. allocation
    credits[PORT_EAST][2] = 3;
    va_grant[0] = 1; va_vc[0] = 2;
    va_grant[1] = 1; va_vc[1] = 1;
    #1;
    expect_(va_req[1] && va_port[1] == PORT_SOUTH, "VC1 asks for VA towards south");
    expect_(sa_req[0] && sa_want[0] == 3, $sformatf("VC0 wants 3 (credit-limited), got %0d", sa_want[0]));
    expect_(sa_req[1] && sa_want[1] == 1 && sa_port[1] == PORT_SOUTH, "VC1 wants its single flit");
    grant_n[0] = 2; grant_n[1] = 1;
    #1;
    expect_(slots_d[0].valid && slots_d[0].vc == 2 && slots_d[0].flit.data == a[0].data &&
            slots_d[0].flit.route == PORT_EAST, "slot 0 = A0 on VC2, lookahead east from (2,1)");
    expect_(slots_d[1].valid && slots_d[1].flit == a[1] && slots_d[1].vc == 2, "slot 1 = A1");
    expect_(slots_d[2].valid && slots_d[2].vc == 1 && slots_d[2].flit.data == b.data &&
            slots_d[2].flit.route == PORT_SOUTH, "slot 2 = B on VC1, lookahead south from (1,2)");
    expect_(!slots_d[3].valid, "slot 3 empty");
    @(negedge clk);
    va_grant = '0; grant_n = '0;
    link_in[0].valid = 1; link_in[0].vc = 0; link_in[0].flit = a[4];
    #1;
    expect_(slots_q[0].flit.data == a[0].data && slots_q[2].flit.data == b.data, "switch register holds the packed flits");
    expect_(credit_out[0] == 2 && credit_out[1] == 1, "credits returned: 2 for VC0, 1 for VC1");
    expect_(vc_count[0] == 2 && vc_count[1] == 0, "VC0 keeps A2, A3; VC1 empty");
    expect_(!va_req[0] && sa_req[0] && sa_port[0] == PORT_EAST, "VC0 holds its VC: no VA, switch request east");
    @(negedge clk);
    link_in = '0;
    #1;
    // 3. remainder of A
    expect_(sa_want[0] == 3, $sformatf("VC0 wants A2..A4, got %0d", sa_want[0]));
    grant_n[0] = 3;
    #1;
    expect_(slots_d[0].flit == a[2] && slots_d[1].flit == a[3] && slots_d[2].flit == a[4] &&
            slots_d[2].vc == 2, "A2..A4 leave in order on VC2");
    @(negedge clk);
    grant_n = '0;
    #1;
    expect_(vc_count[0] == 0 && !sa_req[0] && !va_req[0], "VC0 empty and free after the tail");
    expect_(credit_out[0] == 3, "three credits back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
