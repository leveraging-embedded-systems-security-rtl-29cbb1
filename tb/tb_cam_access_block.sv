// tb_cam_access_block: drives acknowledged instructions and CAM answers into
// the CAM Access Block and checks the search key, the start/miss decision and
// the routing of address, count and static hash.
module tb_cam_access_block;
  import watchdog_pkg::*;

  exec_insn_t insn = '0;
  logic [ADDR_W-1:0] cam_key, bb_addr;
  logic cam_hit = 1'b0;
  cam_entry_t cam_entry = '0;
  logic bb_start, bb_miss;
  logic [CNT_W-1:0] bb_count;
  logic [HASH_W-1:0] static_hash;

  int checks = 0, failures = 0;
  int n_start = 0, n_miss = 0, n_idle = 0;

  cam_access_block dut (.insn_i(insn), .cam_key, .cam_hit, .cam_entry,
                        .bb_start, .bb_miss, .bb_addr, .bb_count, .static_hash);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog_timer
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      insn.valid  = ($urandom_range(0, 3) != 0);
      insn.pc     = $urandom;
      insn.opcode = $urandom;
      cam_hit     = ($urandom_range(0, 1) == 1);
      cam_entry.first_addr = insn.pc;
      cam_entry.hash  = $urandom;
      cam_entry.count = CNT_W'($urandom_range(1, 255));
      #5;
      check(cam_key == insn.pc, "search key is the executed PC");
      check(bb_start == (insn.valid && cam_hit), "block start");
      check(bb_miss == (insn.valid && !cam_hit), "block miss");
      if (insn.valid && cam_hit) begin
        n_start++;
        check(bb_addr == cam_entry.first_addr, "address to hash builder");
        check(bb_count == cam_entry.count, "count to hash builder");
        check(static_hash == cam_entry.hash, "static hash to comparison");
      end else if (insn.valid) n_miss++;
      else n_idle++;
      #5;
    end
    check(n_start > 0 && n_miss > 0 && n_idle > 0, "all cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
