// tb_watchdog: end-to-end test of the watchdog at its default size. The
// testbench holds a random program of basic blocks (one per CAM line, random
// lengths, one-instruction blocks included), computes each block's static hash
// itself and loads the CAM through the load port. A behavioural instruction
// stream then stands in for the processor: it executes blocks in a random
// control flow with pipeline stalls and annulled instructions, and launches
// the attacks the watchdog must catch:
//   - altered instruction word inside a block (injected code, DMA write into
//     program memory, hardware Trojan flipping an opcode bit);
//   - changed return address: execution continues in injected code, or in
//     the middle of a genuine block, after a block ends;
//   - an injected branch that leaves a block early into another block;
//   - a removed instruction (block shorter than analysed).
// A cycle-level reference model (written from the behaviour, not from the
// RTL) predicts block_ok and attack_detected for every cycle; each attack is
// also checked to be detected, with the detection latency measured from the
// tampered instruction, and error_irq/error_cause are checked and cleared.
// Every mechanism (start, match, mismatch, bad entry, stall, annul,
// one-instruction block, nested start, resynchronisation, interrupt clear)
// is counted and must occur at least once.
module tb_watchdog;
  import watchdog_pkg::*;

  localparam int unsigned NB = CAM_ENTRIES;   // blocks in the program
  localparam int unsigned IW = $clog2(NB);
  localparam logic [ADDR_W-1:0] BASE = 32'h4000_0000;
  localparam logic [ADDR_W-1:0] EVIL = 32'h7FF0_0000;  // injected code

  logic clk = 1'b0, rst_n = 1'b0;
  logic ex_valid = 1'b0, ex_annul = 1'b0;
  logic [ADDR_W-1:0] ex_pc = '0;
  logic [INSN_W-1:0] ex_opcode = '0;
  logic cam_we = 1'b0, cam_wvalid = 1'b0;
  logic [IW-1:0] cam_windex = '0;
  logic [ADDR_W-1:0] cam_wfirst_addr = '0;
  logic [HASH_W-1:0] cam_whash = '0;
  logic [CNT_W-1:0] cam_wcount = '0;
  logic irq_clear = 1'b0;
  logic error_irq, attack_detected, block_ok, busy;
  logic [1:0] error_cause;
  logic [ADDR_W-1:0] block_addr;

  watchdog dut (
    .clk, .rst_n, .ex_valid, .ex_annul, .ex_pc, .ex_opcode,
    .cam_we, .cam_windex, .cam_wvalid, .cam_wfirst_addr, .cam_whash, .cam_wcount,
    .irq_clear, .error_irq, .error_cause, .attack_detected,
    .block_ok, .busy, .block_addr);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog_timer
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- program ----------------
  logic [ADDR_W-1:0] bstart [NB];
  int                blen   [NB];
  logic [HASH_W-1:0] bhash  [NB];
  logic [INSN_W-1:0] imem   [int];   // word address -> instruction word
  int                start_of [logic [ADDR_W-1:0]];   // block start -> block

  // ---------------- reference model ----------------
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  bit                m_active, m_synced;
  int                m_left, m_blk;
  logic [HASH_W-1:0] m_acc;
  bit exp_ok [int];
  bit exp_attack [int];

  // counters of mechanisms
  int n_start = 0, n_match = 0, n_mismatch = 0, n_entry = 0, n_stall = 0;
  int n_annul = 0, n_single = 0, n_nested = 0, n_resync = 0, n_clear = 0;
  int n_attacks = 0, n_detected = 0;

  // Present one instruction (or a stall) to the watchdog for one cycle and
  // advance the reference model. Returns the cycle it was presented in.
  task automatic issue(input bit v, input bit annul, input logic [ADDR_W-1:0] pc,
                       input logic [INSN_W-1:0] op, output int at);
    bit exe, hit, done, stray;
    @(negedge clk);
    ex_valid = v; ex_annul = annul; ex_pc = pc; ex_opcode = op;
    at = cyc;
    exe = v && !annul;
    if (!v) n_stall++;
    else if (annul) n_annul++;
    hit = exe && start_of.exists(pc);
    done = 1'b0; stray = 1'b0;
    if (exe && !m_active && hit) begin
      if (!m_synced && n_start > 0) n_resync++;
      n_start++;
      m_synced = 1'b1; m_blk = start_of[pc];
      m_acc = op; m_left = blen[m_blk] - 1;
      if (blen[m_blk] == 1) n_single++;
      done = (m_left == 0);
      m_active = !done;
    end else if (exe && m_active) begin
      if (hit) n_nested++;
      m_acc ^= op; m_left--;
      done = (m_left == 0);
      if (done) m_active = 1'b0;
    end else if (exe && m_synced) begin
      stray = 1'b1; m_synced = 1'b0;
    end
    if (done) begin
      if (m_acc == bhash[m_blk]) begin exp_ok[at + 3] = 1'b1; n_match++; end
      else begin exp_attack[at + 3] = 1'b1; n_mismatch++; end
    end
    if (stray) begin exp_attack[at + 3] = 1'b1; n_entry++; end
  endtask

  // Cycle-by-cycle comparison of the outputs with the model.
  int first_attack_seen = -1;
  always @(negedge clk) if (rst_n) begin
    check(block_ok == exp_ok.exists(cyc), "block_ok matches model");
    check(attack_detected == exp_attack.exists(cyc), "attack_detected matches model");
    if (attack_detected && first_attack_seen < 0) first_attack_seen = cyc;
  end

  // Execute an instruction with random stalls / annulled slots around it.
  task automatic exec_insn(input logic [ADDR_W-1:0] pc, input logic [INSN_W-1:0] op,
                           output int at);
    int dummy;
    while ($urandom_range(0, 6) == 0) issue(1'b0, 1'b0, '0, $urandom, dummy);
    if ($urandom_range(0, 9) == 0) issue(1'b1, 1'b1, pc, $urandom, dummy);  // annulled
    issue(1'b1, 1'b0, pc, op, at);
  endtask

  task automatic run_block(input int b);
    int at;
    for (int k = 0; k < blen[b]; k++)
      exec_insn(bstart[b] + 32'(k * 4), imem[(bstart[b] >> 2) + k], at);
  endtask

  // Wait for the pipeline to drain, then check that an attack presented in
  // cycle 'tampered' was detected, with the given cause bit, and clear it.
  // 'due' is the cycle the detection must appear in: three cycles after the
  // last instruction of a bad block, or after the first stray instruction.
  task automatic expect_detect(input int tampered, input int due, input int cause_bit,
                               input string what);
    int dummy;
    n_attacks++;
    repeat (4) issue(1'b0, 1'b0, '0, '0, dummy);
    @(negedge clk);
    check(error_irq == 1'b1, {what, ": error_irq raised"});
    check(error_cause[cause_bit] == 1'b1, {what, ": error_cause"});
    check(first_attack_seen == due, {what, ": detection cycle"});
    if (error_irq) n_detected++;
    $display("%-28s detected %0d cycles after the tampered instruction",
             what, first_attack_seen - tampered);
    irq_clear = 1'b1;
    @(negedge clk);
    irq_clear = 1'b0;
    @(negedge clk);
    check(error_irq == 1'b0 && error_cause == 2'b00, {what, ": cleared"});
    n_clear++;
  endtask

  function automatic int next_block(input int b);
    return (b + 1 + $urandom_range(0, 3)) % NB;
  endfunction

  initial begin
    logic [ADDR_W-1:0] a;
    int b, at, tamper_at, nxt, dummy;
    m_active = 0; m_synced = 0; m_left = 0; m_blk = 0; m_acc = '0;
    // Build the program: NB blocks, 1..12 instructions each.
    a = BASE;
    for (int i = 0; i < NB; i++) begin
      bstart[i] = a;
      blen[i]   = (i % 9 == 4) ? 1 : $urandom_range(2, 12);
      bhash[i]  = '0;
      for (int k = 0; k < blen[i]; k++) begin
        imem[(a >> 2) + k] = $urandom;
        bhash[i] ^= imem[(a >> 2) + k];
      end
      start_of[a] = i;
      a += 32'(blen[i] * 4);
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // Load the CAM (lines in a scrambled order of the blocks).
    for (int i = 0; i < NB; i++) begin
      int j;
      j = (i * 37 + 11) % NB;
      @(negedge clk);
      cam_we = 1'b1; cam_windex = IW'(i); cam_wvalid = 1'b1;
      cam_wfirst_addr = bstart[j]; cam_whash = bhash[j]; cam_wcount = CNT_W'(blen[j]);
    end
    @(negedge clk);
    cam_we = 1'b0;

    // Start-up code outside the protected program is not checked.
    for (int i = 0; i < 4; i++) issue(1'b1, 1'b0, 32'h0000_0100 + 32'(i * 4), $urandom, dummy);

    // 1. Normal execution: every block once, then a random control flow.
    for (int i = 0; i < NB; i++) run_block(i);
    b = 0;
    for (int i = 0; i < 400; i++) begin run_block(b); b = next_block(b); end
    repeat (4) issue(1'b0, 1'b0, '0, '0, dummy);
    check(n_mismatch == 0 && n_entry == 0 && error_irq == 1'b0, "no false alarm in normal run");

    for (int round = 0; round < 8; round++) begin
      // 2. Altered instruction word inside a block.
      first_attack_seen = -1;
      b = $urandom_range(0, NB - 1);
      tamper_at = $urandom_range(0, blen[b] - 1);
      for (int k = 0; k < blen[b]; k++) begin
        logic [INSN_W-1:0] op;
        op = imem[(bstart[b] >> 2) + k];
        if (k == tamper_at) op ^= 32'(1) << $urandom_range(0, 31);
        exec_insn(bstart[b] + 32'(k * 4), op, at);
        if (k == tamper_at) tamper_at = at;
      end
      expect_detect(tamper_at, at + 3, 0, "altered instruction");
      b = next_block(b); run_block(b);

      // 3a. Return into injected code after a block ends.
      b = next_block(b); run_block(b);
      first_attack_seen = -1;
      for (int k = 0; k < 6; k++) begin
        exec_insn(EVIL + 32'(k * 4), $urandom, at);
        if (k == 0) tamper_at = at;
      end
      expect_detect(tamper_at, tamper_at + 3, 1, "return into injected code");
      b = next_block(b); run_block(b);                // resynchronises

      // 3b. Return into the middle of a genuine block.
      do b = $urandom_range(0, NB - 1); while (blen[b] < 3);
      first_attack_seen = -1;
      for (int k = 1; k < blen[b]; k++) begin
        exec_insn(bstart[b] + 32'(k * 4), imem[(bstart[b] >> 2) + k], at);
        if (k == 1) tamper_at = at;
      end
      expect_detect(tamper_at, tamper_at + 3, 1, "return into mid-block");
      b = next_block(b); run_block(b);

      // 4. Injected branch leaves a block early into another block.
      do b = $urandom_range(0, NB - 1); while (blen[b] < 4);
      nxt = next_block(b);
      for (int k = 0; k < 2; k++)
        exec_insn(bstart[b] + 32'(k * 4), imem[(bstart[b] >> 2) + k], at);
      tamper_at = -1;
      for (int k = 0; k < blen[nxt]; k++) begin
        exec_insn(bstart[nxt] + 32'(k * 4), imem[(bstart[nxt] >> 2) + k], at);
        if (k == 0) tamper_at = at;
      end
      // Hashing continues over the other block's code; keep running blocks
      // until the model has seen the outcome (mismatch or bad entry).
      while (m_active) begin
        nxt = next_block(nxt); run_block(nxt);
      end
      repeat (4) issue(1'b0, 1'b0, '0, '0, dummy);
      @(negedge clk);
      check(error_irq == 1'b1, "early exit detected");
      n_attacks++;
      if (error_irq) n_detected++;
      irq_clear = 1'b1; @(negedge clk); irq_clear = 1'b0;
      n_clear++;
      // Resynchronise on a fresh block start.
      b = next_block(nxt);
      repeat (3) begin run_block(b); b = next_block(b); end

      // 5. One instruction removed from a block.
      do b = $urandom_range(0, NB - 1); while (blen[b] < 3);
      tamper_at = $urandom_range(1, blen[b] - 1);
      for (int k = 0; k < blen[b]; k++)
        if (k != tamper_at) exec_insn(bstart[b] + 32'(k * 4), imem[(bstart[b] >> 2) + k], at);
      b = next_block(b);
      run_block(b);
      repeat (4) issue(1'b0, 1'b0, '0, '0, dummy);
      @(negedge clk);
      check(error_irq == 1'b1, "removed instruction detected");
      n_attacks++;
      if (error_irq) n_detected++;
      irq_clear = 1'b1; @(negedge clk); irq_clear = 1'b0;
      n_clear++;
      b = next_block(b);
      repeat (3) begin run_block(b); b = next_block(b); end
      repeat (4) issue(1'b0, 1'b0, '0, '0, dummy);
    end

    $display("blocks started=%0d matched=%0d mismatched=%0d bad_entries=%0d",
             n_start, n_match, n_mismatch, n_entry);
    $display("stalls=%0d annulled=%0d single=%0d nested_starts=%0d resyncs=%0d clears=%0d",
             n_stall, n_annul, n_single, n_nested, n_resync, n_clear);
    $display("attacks=%0d detected=%0d", n_attacks, n_detected);
    check(n_detected == n_attacks, "every attack detected");
    check(n_start > 0, "mechanism: block start");
    check(n_match > 0, "mechanism: hash match");
    check(n_mismatch > 0, "mechanism: hash mismatch");
    check(n_entry > 0, "mechanism: bad entry");
    check(n_stall > 0, "mechanism: stall");
    check(n_annul > 0, "mechanism: annulled instruction");
    check(n_single > 0, "mechanism: one-instruction block");
    check(n_nested > 0, "mechanism: block start inside a block");
    check(n_resync > 0, "mechanism: resynchronisation");
    check(n_clear > 0, "mechanism: interrupt clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
