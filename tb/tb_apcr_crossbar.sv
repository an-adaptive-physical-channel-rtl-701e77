// tb_apcr_crossbar: random flit slots and random selects; every output
// sub-channel must carry exactly the selected input slot, or nothing when its
// select is not valid.
module tb_apcr_crossbar;
  import apcr_pkg::*;
  link_t [NUM_PORTS-1:0] in_slots, out_links;
  logic  [NUM_PORTS-1:0][NUM_SUB-1:0] sel_valid;
  logic  [NUM_PORTS-1:0][NUM_SUB-1:0][PORT_W-1:0] sel_in;
  logic  [NUM_PORTS-1:0][NUM_SUB-1:0][CNT_W-1:0] sel_slot;
  int checks = 0, failures = 0;

  apcr_crossbar dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < NUM_PORTS; i++)
        for (int s = 0; s < NUM_SUB; s++) begin
          in_slots[i][s].valid = 1'b1;
          in_slots[i][s].vc    = VC_W'($urandom);
          in_slots[i][s].flit  = '0;
          in_slots[i][s].flit.data = {$urandom, $urandom, $urandom, $urandom};
        end
      for (int o = 0; o < NUM_PORTS; o++)
        for (int k = 0; k < NUM_SUB; k++) begin
          sel_valid[o][k] = $urandom_range(0, 1);
          sel_in[o][k]    = PORT_W'($urandom_range(0, NUM_PORTS - 1));
          sel_slot[o][k]  = CNT_W'($urandom_range(0, NUM_SUB - 1));
        end
      #1;
      for (int o = 0; o < NUM_PORTS; o++)
        for (int k = 0; k < NUM_SUB; k++) begin
          subch_t exp;
          exp = sel_valid[o][k] ? in_slots[sel_in[o][k]][sel_slot[o][k]] : '0;
          checks++;
          if (out_links[o][k] != exp) begin
            failures++;
            if (failures < 10) $display("t=%0d out %0d sub %0d wrong", t, o, k);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
