// watchdog: hardware attack detector that sits beside a processor and checks,
// at run time, that every basic block the processor executes is the block the
// program was compiled into. A basic block is a run of instructions ending in
// a branch. Before the program runs, a CAM is loaded with one line per block:
// the address of its first instruction, the XOR of all its instruction words
// (static hash) and its number of instructions. While the program runs, the
// watchdog XORs the instruction words the processor really executes (dynamic
// hash) from a block start until the block's count is reached, and compares
// the two hashes. Injected or altered code (stack smashing, DMA writes into
// program memory, a hardware Trojan changing instructions) gives a different
// hash or enters code where no block starts, and the error indication
// interrupts the processor. The program needs no recompilation and no
// operating-system support.
//
// Structure (one block per file):
//   decision_block   -> samples PC, instruction word and annul bit
//   cam_access_block -> searches cam_memory with the executed PC
//   hash_builder     -> counts and XORs the block's instructions
//   comparison_block -> compares hashes, raises error_irq
//
// Interface: ex_* come from the processor's execution stage; cam_* load one
// CAM line per clock; error_irq / error_cause / attack_detected go back to the
// processor, irq_clear acknowledges the interrupt.
// Timing: one instruction per clock at most. attack_detected pulses three
// clocks after the last instruction of a bad block (or a stray instruction)
// leaves the execution stage; error_irq rises in that same cycle.
// The block structure, the XOR hash, the CAM contents and the use of the annul
// bit follow the described watchdog. The CAM size, count width, load port,
// entry check (CHECK_ENTRY) and interrupt handshake are this design's own.
module watchdog
  import watchdog_pkg::*;
#(
  parameter int unsigned ENTRIES     = CAM_ENTRIES,
  parameter bit          CHECK_ENTRY = 1'b1,
  localparam int unsigned IDX_W      = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // processor execution stage
  input  logic              ex_valid,
  input  logic              ex_annul,
  input  logic [ADDR_W-1:0] ex_pc,
  input  logic [INSN_W-1:0] ex_opcode,
  // CAM load port (static analysis results)
  input  logic              cam_we,
  input  logic [IDX_W-1:0]  cam_windex,
  input  logic              cam_wvalid,
  input  logic [ADDR_W-1:0] cam_wfirst_addr,
  input  logic [HASH_W-1:0] cam_whash,
  input  logic [CNT_W-1:0]  cam_wcount,
  // error indication to the processor
  input  logic              irq_clear,
  output logic              error_irq,
  output logic [1:0]        error_cause,   // bit 0 hash mismatch, bit 1 bad entry
  output logic              attack_detected,
  // status
  output logic              block_ok,      // a block's hashes matched
  output logic              busy,
  output logic [ADDR_W-1:0] block_addr
);

  exec_insn_t        insn;
  logic [ADDR_W-1:0] cam_key;
  logic              cam_hit;
  cam_entry_t        cam_entry, cam_wentry;
  logic              bb_start, bb_miss;
  logic [ADDR_W-1:0] bb_addr;
  logic [CNT_W-1:0]  bb_count;
  logic [HASH_W-1:0] static_hash;
  logic              accept, dyn_valid, entry_err;
  logic [HASH_W-1:0] dyn_hash;
  err_cause_t        cause;

  assign cam_wentry = '{first_addr: cam_wfirst_addr, hash: cam_whash, count: cam_wcount};

  decision_block u_decision (
    .clk, .rst_n, .ex_valid, .ex_annul, .ex_pc, .ex_opcode, .insn_o(insn)
  );

  cam_memory #(.ENTRIES(ENTRIES)) u_cam (
    .clk, .rst_n,
    .we(cam_we), .windex(cam_windex), .wvalid(cam_wvalid), .wentry(cam_wentry),
    .search_key(cam_key), .hit(cam_hit), .entry_o(cam_entry)
  );

  cam_access_block u_cam_access (
    .insn_i(insn), .cam_key, .cam_hit, .cam_entry,
    .bb_start, .bb_miss, .bb_addr, .bb_count, .static_hash
  );

  hash_builder #(.CHECK_ENTRY(CHECK_ENTRY)) u_hash (
    .clk, .rst_n, .insn_i(insn), .bb_start, .bb_miss, .bb_addr, .bb_count,
    .accept, .dyn_valid, .dyn_hash, .entry_err, .busy, .block_addr
  );

  comparison_block u_compare (
    .clk, .rst_n, .accept, .static_hash, .dyn_valid, .dyn_hash, .entry_err,
    .irq_clear, .check_ok(block_ok), .attack_detected, .error_irq,
    .error_cause(cause)
  );

  assign error_cause = cause;

endmodule
