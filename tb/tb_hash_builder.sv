// tb_hash_builder: feeds the Hash Builder with executed instructions and the
// CAM Access Block's start/miss answers, generated from a small random program
// of basic blocks. A reference model in the testbench (XOR and count from the
// accepted block start) predicts accept, dyn_valid/dyn_hash and entry_err
// every cycle. The stimulus includes stalls, one-instruction blocks, block
// starts inside a running block, stray instructions after a block end and
// runs with and without the entry check.
module tb_hash_builder;
  import watchdog_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  exec_insn_t insn = '0;
  logic bb_start = 1'b0, bb_miss = 1'b0;
  logic [ADDR_W-1:0] bb_addr = '0;
  logic [CNT_W-1:0] bb_count = '0;
  logic accept, dyn_valid, entry_err, busy;
  logic [HASH_W-1:0] dyn_hash;
  logic [ADDR_W-1:0] block_addr;
  logic accept0, dyn_valid0, entry_err0, busy0;
  logic [HASH_W-1:0] dyn_hash0;
  logic [ADDR_W-1:0] block_addr0;

  int checks = 0, failures = 0;
  int n_done = 0, n_single = 0, n_stray = 0, n_nested = 0, n_stall = 0;

  hash_builder #(.CHECK_ENTRY(1'b1)) dut (
    .clk, .rst_n, .insn_i(insn), .bb_start, .bb_miss, .bb_addr, .bb_count,
    .accept, .dyn_valid, .dyn_hash, .entry_err, .busy, .block_addr);
  // Same block with the entry check off: never reports entry errors.
  hash_builder #(.CHECK_ENTRY(1'b0)) dut0 (
    .clk, .rst_n, .insn_i(insn), .bb_start, .bb_miss, .bb_addr, .bb_count,
    .accept(accept0), .dyn_valid(dyn_valid0), .dyn_hash(dyn_hash0),
    .entry_err(entry_err0), .busy(busy0), .block_addr(block_addr0));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog_timer
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model state (updated at each clock edge).
  bit                m_active, m_synced;
  int                m_left;
  logic [HASH_W-1:0] m_acc;
  bit                e_done, e_stray;          // expected registered outputs
  logic [HASH_W-1:0] e_hash;

  // Apply one cycle of stimulus, check combinational and registered outputs.
  task automatic step(input bit v, input logic [ADDR_W-1:0] pc,
                      input logic [INSN_W-1:0] op, input bit start, input int cnt);
    bit acc_exp, done, stray;
    logic [HASH_W-1:0] h;
    @(negedge clk);
    // registered outputs from the previous cycle
    check(dyn_valid == e_done, "dyn_valid timing");
    if (e_done) check(dyn_hash == e_hash, "dynamic hash value");
    check(entry_err == e_stray, "entry_err");
    check(entry_err0 == 1'b0, "no entry_err when check is off");
    check(busy == m_active, "busy");
    insn.valid = v; insn.pc = pc; insn.opcode = op;
    bb_start = v && start; bb_miss = v && !start;
    bb_addr = start ? pc : '0; bb_count = start ? CNT_W'(cnt) : '0;
    #1;
    acc_exp = v && !m_active && start;
    check(accept == acc_exp, "accept");
    done = 1'b0; stray = 1'b0; h = '0;
    if (acc_exp) begin
      m_synced = 1'b1;
      m_acc = op; m_left = cnt - 1;
      if (m_left == 0) begin done = 1'b1; h = m_acc; end
      m_active = !done;
      if (cnt == 1) n_single++;
    end else if (m_active && v) begin
      if (start) n_nested++;
      m_acc ^= op; m_left--;
      if (m_left == 0) begin done = 1'b1; h = m_acc; m_active = 1'b0; end
    end else if (v && !start && m_synced) begin
      stray = 1'b1; m_synced = 1'b0; n_stray++;
    end
    if (!v) n_stall++;
    if (done) n_done++;
    e_done = done; e_stray = stray; e_hash = h;
  endtask

  initial begin
    int cnt, pc;
    m_active = 0; m_synced = 0; m_left = 0; m_acc = '0; e_done = 0; e_stray = 0; e_hash = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // Instructions before any block start are ignored (not yet synchronised).
    for (int i = 0; i < 5; i++) step(1'b1, 32'h100 + 32'(i * 4), $urandom, 1'b0, 0);
    pc = 'h1000;
    for (int b = 0; b < 600; b++) begin
      cnt = ($urandom_range(0, 5) == 0) ? 1 : $urandom_range(2, 20);
      step(1'b1, pc, $urandom, 1'b1, cnt);           // block start
      for (int k = 1; k < cnt; k++) begin
        while ($urandom_range(0, 4) == 0) step(1'b0, '0, $urandom, 1'b0, 0); // stall
        // occasionally a block-start address appears inside the block
        step(1'b1, pc + 32'(k * 4), $urandom, ($urandom_range(0, 9) == 0), 7);
      end
      pc += 32'(cnt * 4);
      // occasionally stray code runs after the block (bad entry)
      if ($urandom_range(0, 7) == 0)
        for (int s = 0; s < 3; s++) step(1'b1, 32'h8000_0000 + 32'(s * 4), $urandom, 1'b0, 0);
      while ($urandom_range(0, 3) == 0) step(1'b0, '0, '0, 1'b0, 0);
    end
    step(1'b0, '0, '0, 1'b0, 0);
    step(1'b0, '0, '0, 1'b0, 0);
    check(n_done > 500 && n_single > 0 && n_stray > 0 && n_nested > 0 && n_stall > 0,
          "all mechanisms exercised");
    $display("blocks=%0d single=%0d stray=%0d nested_start=%0d stalls=%0d",
             n_done, n_single, n_stray, n_nested, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
