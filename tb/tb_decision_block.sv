// tb_decision_block: drives random instructions, stalls and annulled
// instructions into the Decision Block and checks, one clock later, that only
// executed (valid, not annulled) instructions are acknowledged, with their PC
// and instruction word intact.
module tb_decision_block;
  import watchdog_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic ex_valid = 1'b0, ex_annul = 1'b0;
  logic [ADDR_W-1:0] ex_pc = '0;
  logic [INSN_W-1:0] ex_opcode = '0;
  exec_insn_t insn;

  int checks = 0, failures = 0;
  int n_exec = 0, n_annul = 0, n_stall = 0;

  decision_block dut (.clk, .rst_n, .ex_valid, .ex_annul, .ex_pc, .ex_opcode, .insn_o(insn));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog_timer
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic              exp_valid;
  logic [ADDR_W-1:0] exp_pc;
  logic [INSN_W-1:0] exp_op;

  initial begin
    repeat (3) @(negedge clk);
    check(insn.valid == 1'b0, "reset clears valid");
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      ex_valid  = ($urandom_range(0, 3) != 0);
      ex_annul  = ($urandom_range(0, 4) == 0);
      ex_pc     = $urandom;
      ex_opcode = $urandom;
      exp_valid = ex_valid && !ex_annul;
      exp_pc    = ex_pc;
      exp_op    = ex_opcode;
      if (!ex_valid) n_stall++;
      else if (ex_annul) n_annul++;
      else n_exec++;
      @(negedge clk);
      check(insn.valid == exp_valid, "valid follows ex_valid & !annul");
      if (exp_valid) begin
        check(insn.pc == exp_pc, "pc registered");
        check(insn.opcode == exp_op, "opcode registered");
      end
      ex_valid = 1'b0;   // one idle cycle: valid must drop again
      @(negedge clk);
      check(insn.valid == 1'b0, "valid is a single-cycle pulse");
    end
    check(n_exec > 0 && n_annul > 0 && n_stall > 0, "all input cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
