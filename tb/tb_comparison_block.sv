// tb_comparison_block: drives static hashes (with accept), dynamic hashes and
// entry errors into the Comparison Block and checks the check_ok and
// attack_detected pulses, the sticky error_irq with its cause bits, and the
// clear handshake, including a static hash replaced in the same cycle as the
// previous block's dynamic hash arrives.
module tb_comparison_block;
  import watchdog_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic accept = 1'b0, dyn_valid = 1'b0, entry_err = 1'b0, irq_clear = 1'b0;
  logic [HASH_W-1:0] static_hash = '0, dyn_hash = '0;
  logic check_ok, attack_detected, error_irq;
  err_cause_t error_cause;

  int checks = 0, failures = 0;
  int n_ok = 0, n_bad = 0, n_entry = 0, n_clear = 0;

  comparison_block dut (.clk, .rst_n, .accept, .static_hash, .dyn_valid, .dyn_hash,
                        .entry_err, .irq_clear, .check_ok, .attack_detected,
                        .error_irq, .error_cause);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog_timer
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [HASH_W-1:0] m_static;
  bit m_irq;
  logic [1:0] m_cause;

  initial begin
    bit a, dv, ee, clr, mism;
    logic [HASH_W-1:0] sh, dh;
    m_static = '0; m_irq = 0; m_cause = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      a   = ($urandom_range(0, 2) == 0);
      sh  = $urandom;
      dv  = ($urandom_range(0, 2) == 0);
      dh  = ($urandom_range(0, 3) == 0) ? $urandom : m_static;  // mostly equal
      ee  = ($urandom_range(0, 15) == 0);
      clr = ($urandom_range(0, 7) == 0);
      accept = a; static_hash = sh; dyn_valid = dv; dyn_hash = dh;
      entry_err = ee; irq_clear = clr;
      mism = dv && (dh != m_static);
      if (a) m_static = sh;
      if (mism || ee) begin
        m_irq = 1'b1;
        m_cause = (clr ? 2'b00 : m_cause) | {ee, mism};
      end else if (clr) begin
        m_irq = 1'b0; m_cause = '0;
        n_clear++;
      end
      if (dv && !mism) n_ok++;
      if (mism) n_bad++;
      if (ee) n_entry++;
      @(negedge clk);
      check(check_ok == (dv && !mism), "check_ok");
      check(attack_detected == (mism || ee), "attack_detected");
      check(error_irq == m_irq, "error_irq sticky/clear");
      check(error_cause == err_cause_t'(m_cause), "error_cause");
    end
    check(n_ok > 0 && n_bad > 0 && n_entry > 0 && n_clear > 0, "all cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
