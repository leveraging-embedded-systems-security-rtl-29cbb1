// tb_attack_scenarios: runs the watchdog (default parameters) against a small
// SPARC V8 program shaped like the vulnerable code the scheme is meant for: a
// main routine calls a function that copies an input string into a 16-byte
// stack buffer with a byte loop and no bounds check, then calls a handler
// through a function pointer. The instruction words are real SPARC V8
// encodings, built by the encoder functions below. The CAM is loaded with the
// program's basic blocks; the testbench computes each block's hash itself.
// A behavioural processor model sequences the blocks (with stalls and
// occasional annulled instructions) and four attacks are played:
//   1. stack smashing: the copied input overwrites the saved return address
//      and "ret" returns into shellcode placed in the buffer;
//   2. function-pointer overwrite: the indirect call "jmpl %g1" lands in
//      injected code;
//   3. DMA attack: a device writes a new word into the copy loop's code in
//      program memory while the program runs;
//   4. hardware Trojan: once triggered, the fetch path flips one bit
//      of a branch instruction (changing its target).
// For each attack the testbench checks detection, its cause and its exact
// cycle (3 clocks after the first injected instruction, or after the last
// instruction of the altered block), and that clean runs before and after
// raise nothing. It reports the detection latency measured from the first
// tampered instruction.
module tb_attack_scenarios;
  import watchdog_pkg::*;

  // ---------------- SPARC V8 encoders ----------------
  // Format 3 (arithmetic, load/store, jmpl): op rd op3 rs1 i simm13/rs2.
  function automatic logic [31:0] f3(input int op, input int rd, input logic [5:0] op3,
                                     input int rs1, input bit i, input int imm);
    return {2'(op), 5'(rd), op3, 5'(rs1), i, i ? 13'(imm) : {8'b0, 5'(imm)}};
  endfunction
  // Format 2 branch: op=0, a, cond, op2=010, disp22 (in words).
  function automatic logic [31:0] bicc(input logic [3:0] cond, input int disp);
    return {2'b00, 1'b0, cond, 3'b010, 22'(disp)};
  endfunction
  // Format 1 call: op=1, disp30 (in words).
  function automatic logic [31:0] call(input int disp);
    return {2'b01, 30'(disp)};
  endfunction

  localparam int G0 = 0, G1 = 1, G2 = 2, O0 = 8, O1 = 9, O7 = 15, SP = 14, FP = 30, I0 = 24, I7 = 31;
  localparam logic [31:0] NOP = 32'h0100_0000;   // sethi 0, %g0

  localparam logic [ADDR_W-1:0] BASE  = 32'h4000_1000;
  localparam logic [ADDR_W-1:0] STACK = 32'h4FFF_FF40;  // address of the stack buffer

  // Basic blocks: word offset from BASE, length.
  typedef enum int { B_MAIN, B_RET, B_TAIL, B_VULN, B_LOOP, B_EPI, B_HANDLER, NBLK } blk_e;
  int boff [NBLK] = '{0, 4, 7, 16, 19, 26, 32};
  int blen [NBLK] = '{4, 3, 2, 3, 7, 2, 2};

  logic [INSN_W-1:0] imem [int];     // word address -> instruction word
  logic [HASH_W-1:0] bhash [NBLK];

  function automatic logic [ADDR_W-1:0] baddr(input int b);
    return BASE + 32'(boff[b] * 4);
  endfunction

  task automatic put(input int off, input logic [31:0] w);
    imem[(BASE >> 2) + off] = w;
  endtask

  task automatic build_program();
    // main: save; or %g0,16,%o0; call vuln; nop
    put(0,  f3(2, SP, 6'h3C, SP, 1, -96));
    put(1,  f3(2, O0, 6'h02, G0, 1, 16));
    put(2,  call(16 - 2));
    put(3,  NOP);
    // return point: ld [%g2],%g1; jmpl %g1,%o7 (call through pointer); nop
    put(4,  f3(3, G1, 6'h00, G2, 1, 0));
    put(5,  f3(2, O7, 6'h38, G1, 0, G0));
    put(6,  NOP);
    // after the handler: ba main; nop
    put(7,  bicc(4'b1000, -7));
    put(8,  NOP);
    // vuln: save; add %fp,-16,%o0 (buffer); or %g0,%i0,%o1  (falls into loop)
    put(16, f3(2, SP, 6'h3C, SP, 1, -112));
    put(17, f3(2, O0, 6'h00, FP, 1, -16));
    put(18, f3(2, O1, 6'h02, G0, 0, I0));
    // loop: ldub [%o1],%g1; stb %g1,[%o0]; add %o1,1,%o1; add %o0,1,%o0;
    //       subcc %g1,0,%g0; bne loop; nop
    put(19, f3(3, G1, 6'h01, O1, 1, 0));
    put(20, f3(3, G1, 6'h05, O0, 1, 0));
    put(21, f3(2, O1, 6'h00, O1, 1, 1));
    put(22, f3(2, O0, 6'h00, O0, 1, 1));
    put(23, f3(2, G0, 6'h14, G1, 1, 0));
    put(24, bicc(4'b1001, -5));
    put(25, NOP);
    // epilogue: ret (jmpl %i7+8,%g0); restore
    put(26, f3(2, G0, 6'h38, I7, 1, 8));
    put(27, f3(2, G0, 6'h3D, G0, 0, G0));
    // handler (leaf): retl (jmpl %o7+8,%g0); nop
    put(32, f3(2, G0, 6'h38, O7, 1, 8));
    put(33, NOP);
    for (int b = 0; b < NBLK; b++) begin
      bhash[b] = '0;
      for (int k = 0; k < blen[b]; k++) bhash[b] ^= imem[(baddr(b) >> 2) + k];
    end
  endtask

  // ---------------- DUT ----------------
  logic clk = 1'b0, rst_n = 1'b0;
  logic ex_valid = 1'b0, ex_annul = 1'b0;
  logic [ADDR_W-1:0] ex_pc = '0;
  logic [INSN_W-1:0] ex_opcode = '0;
  logic cam_we = 1'b0, cam_wvalid = 1'b0;
  logic [$clog2(CAM_ENTRIES)-1:0] cam_windex = '0;
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
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- processor model ----------------
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  bit exp_ok [int];
  bit exp_attack [int];
  int first_alarm = -1;
  int n_ok_seen = 0, n_loop_iter = 0;

  always @(negedge clk) if (rst_n) begin
    check(block_ok == exp_ok.exists(cyc), "block_ok when expected");
    check(attack_detected == exp_attack.exists(cyc), "attack_detected when expected");
    if (block_ok) n_ok_seen++;
    if (attack_detected && first_alarm < 0) first_alarm = cyc;
  end

  // Hardware Trojan in the fetch path: armed = flip bit 'ht_bit' of the word
  // fetched at 'ht_pc' once.
  bit ht_armed = 1'b0;
  logic [ADDR_W-1:0] ht_pc;
  int ht_bit;

  task automatic issue(input logic [ADDR_W-1:0] pc, input logic [INSN_W-1:0] w, output int at);
    while ($urandom_range(0, 5) == 0) begin       // pipeline hold
      @(negedge clk); ex_valid = 1'b0;
    end
    if ($urandom_range(0, 11) == 0) begin         // squashed instruction
      @(negedge clk); ex_valid = 1'b1; ex_annul = 1'b1; ex_pc = pc + 4; ex_opcode = $urandom;
    end
    @(negedge clk);
    ex_valid = 1'b1; ex_annul = 1'b0; ex_pc = pc; ex_opcode = w; at = cyc;
  endtask

  // Execute block b from program memory. Returns the cycle of its last
  // instruction and of the first word that differs from the analysed code.
  task automatic run_block(input int b, output int last_at, output int bad_at);
    logic [INSN_W-1:0] w;
    logic [HASH_W-1:0] h;
    int at;
    h = '0; bad_at = -1;
    for (int k = 0; k < blen[b]; k++) begin
      logic [ADDR_W-1:0] pc;
      pc = baddr(b) + 32'(k * 4);
      w = imem[pc >> 2];
      if (ht_armed && pc == ht_pc) begin
        w ^= 32'(1) << ht_bit;
        ht_armed = 1'b0;
      end
      issue(pc, w, at);
      h ^= w;
      if (w != imem_golden(pc) && bad_at < 0) bad_at = at;
    end
    last_at = at;
    if (h == bhash[b]) exp_ok[last_at + 3] = 1'b1;
    else exp_attack[last_at + 3] = 1'b1;
    @(negedge clk); ex_valid = 1'b0;
  endtask

  logic [INSN_W-1:0] golden [int];
  function automatic logic [INSN_W-1:0] imem_golden(input logic [ADDR_W-1:0] pc);
    return golden[pc >> 2];
  endfunction

  // Run injected code (never analysed): first word is a stray entry.
  task automatic run_injected(input logic [ADDR_W-1:0] at_pc, input int n, output int first_at);
    int at;
    for (int k = 0; k < n; k++) begin
      issue(at_pc + 32'(k * 4), $urandom, at);
      if (k == 0) begin first_at = at; exp_attack[at + 3] = 1'b1; end
    end
    @(negedge clk); ex_valid = 1'b0;
  endtask

  // One pass of the program with an input string of 'len' bytes.
  task automatic run_main(input int len);
    int last, bad;
    run_block(B_MAIN, last, bad);
    run_block(B_VULN, last, bad);
    for (int i = 0; i <= len; i++) begin          // copy including the NUL
      run_block(B_LOOP, last, bad);
      n_loop_iter++;
    end
    run_block(B_EPI, last, bad);
    run_block(B_RET, last, bad);
    run_block(B_HANDLER, last, bad);
    run_block(B_TAIL, last, bad);
  endtask

  task automatic drain_and_expect(input int due, input int cause_bit, input int tampered,
                                  input string what);
    repeat (6) @(negedge clk);
    check(error_irq == 1'b1, {what, ": error raised"});
    check(error_cause[cause_bit] == 1'b1, {what, ": cause"});
    check(first_alarm == due, {what, ": detection cycle"});
    $display("%-34s detected %0d cycles after the first tampered instruction",
             what, first_alarm - tampered);
    irq_clear = 1'b1; @(negedge clk); irq_clear = 1'b0; @(negedge clk);
    check(error_irq == 1'b0, {what, ": cleared"});
    first_alarm = -1;
  endtask

  int n_detected = 0;

  initial begin
    int last, bad, first, ok_before;
    build_program();
    foreach (imem[a]) golden[a] = imem[a];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < NBLK; b++) begin
      @(negedge clk);
      cam_we = 1'b1; cam_windex = 8'(b); cam_wvalid = 1'b1;
      cam_wfirst_addr = baddr(b); cam_whash = bhash[b]; cam_wcount = CNT_W'(blen[b]);
    end
    @(negedge clk); cam_we = 1'b0;

    // Clean runs with inputs that fit the buffer.
    for (int r = 0; r < 5; r++) run_main($urandom_range(0, 15));
    repeat (6) @(negedge clk);
    check(error_irq == 1'b0 && first_alarm < 0, "clean runs raise nothing");
    ok_before = n_ok_seen;
    check(ok_before > 0, "clean blocks matched");

    // 1. Stack smashing: 24-byte input overruns the buffer and the saved
    //    return address; "ret" goes to the shellcode in the buffer.
    run_block(B_MAIN, last, bad);
    run_block(B_VULN, last, bad);
    for (int i = 0; i <= 24; i++) run_block(B_LOOP, last, bad);
    run_block(B_EPI, last, bad);
    run_injected(STACK, 8, first);
    drain_and_expect(first + 3, 1, first, "stack smashing (return into buffer)");
    n_detected++;
    run_main(3);

    // 2. Function pointer overwritten: the indirect call lands in injected code.
    run_block(B_MAIN, last, bad);
    run_block(B_VULN, last, bad);
    for (int i = 0; i <= 6; i++) run_block(B_LOOP, last, bad);
    run_block(B_EPI, last, bad);
    run_block(B_RET, last, bad);
    run_injected(STACK + 32'h20, 5, first);
    drain_and_expect(first + 3, 1, first, "function pointer overwrite");
    n_detected++;
    run_main(2);

    // 3. DMA write into the copy loop's code (its store becomes a load).
    imem[(baddr(B_LOOP) >> 2) + 1] = f3(3, G1, 6'h01, O0, 1, 0);
    run_block(B_MAIN, last, bad);
    run_block(B_VULN, last, bad);
    run_block(B_LOOP, last, bad);
    drain_and_expect(last + 3, 0, bad, "DMA write into program memory");
    n_detected++;
    imem[(baddr(B_LOOP) >> 2) + 1] = golden[(baddr(B_LOOP) >> 2) + 1];  // restored
    run_main(4);

    // 4. Hardware Trojan: flips a bit of "ba main" on its next fetch.
    ht_armed = 1'b1; ht_pc = baddr(B_TAIL); ht_bit = 3;
    run_main(1);
    repeat (6) @(negedge clk);
    check(ht_armed == 1'b0, "Trojan fired");
    check(error_irq == 1'b1 && error_cause[0] == 1'b1, "Trojan-altered branch detected");
    if (error_irq) n_detected++;
    irq_clear = 1'b1; @(negedge clk); irq_clear = 1'b0;
    first_alarm = -1;

    // Back to clean operation.
    for (int r = 0; r < 3; r++) run_main($urandom_range(0, 15));
    repeat (6) @(negedge clk);
    check(error_irq == 1'b0 && first_alarm < 0, "clean again after the attacks");

    $display("clean blocks matched=%0d loop iterations=%0d attacks detected=%0d of 4",
             n_ok_seen, n_loop_iter, n_detected);
    check(n_detected == 4, "all four attacks detected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
