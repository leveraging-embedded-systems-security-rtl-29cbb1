// hash_builder: computes the dynamic hash of the basic block being executed.
// When it is idle and an executed instruction starts a block (CAM hit), it
// accepts the block: it loads the block's instruction count and starts the
// hash with that instruction's word. Every further executed instruction is
// XORed in and counted, whatever its address, until the count is used up; the
// finished hash is then handed to the Comparison Block. Instructions that
// start a block are ignored while a block is being hashed, so a jump into
// another block is hashed as part of the current one and shows as a mismatch.
//
// Entry check (CHECK_ENTRY = 1): once a first block has been accepted, every
// block must be followed by the start of another block, because the program
// is completely divided into blocks. An executed instruction that arrives
// while the builder is idle and starts no block (for instance a return into
// injected code) has no static hash; it is reported as entry_err and the
// builder waits for the next block start. This check is a choice of this
// design; with CHECK_ENTRY = 0 such code is simply not monitored.
//
// Interface: insn_i from the Decision Block, bb_* from the CAM Access Block.
// accept is a combinational pulse in the cycle a block is accepted (the
// Comparison Block latches the static hash then). dyn_valid/dyn_hash and
// entry_err are registered pulses, one clock after the last instruction of the
// block (or the stray instruction) was acknowledged.
module hash_builder
  import watchdog_pkg::*;
#(
  parameter bit CHECK_ENTRY = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  exec_insn_t        insn_i,
  input  logic              bb_start,
  input  logic              bb_miss,
  input  logic [ADDR_W-1:0] bb_addr,
  input  logic [CNT_W-1:0]  bb_count,
  output logic              accept,
  output logic              dyn_valid,
  output logic [HASH_W-1:0] dyn_hash,
  output logic              entry_err,
  output logic              busy,        // a block is being hashed
  output logic [ADDR_W-1:0] block_addr   // first address of that block
);

  logic              active_q, synced_q;
  logic [CNT_W-1:0]  remaining_q;         // instructions still to come
  logic [HASH_W-1:0] acc_q;

  logic              done;
  logic [HASH_W-1:0] done_hash;
  logic              stray;

  always_comb begin
    accept    = insn_i.valid && !active_q && bb_start;
    stray     = CHECK_ENTRY && insn_i.valid && !active_q && synced_q && bb_miss;
    done      = 1'b0;
    done_hash = acc_q ^ insn_i.opcode;
    if (accept && bb_count == CNT_W'(1)) begin
      done      = 1'b1;
      done_hash = insn_i.opcode;
    end else if (active_q && insn_i.valid && remaining_q == CNT_W'(1)) begin
      done = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active_q    <= 1'b0;
      synced_q    <= 1'b0;
      remaining_q <= '0;
      acc_q       <= '0;
      block_addr  <= '0;
      dyn_valid   <= 1'b0;
      dyn_hash    <= '0;
      entry_err   <= 1'b0;
    end else begin
      dyn_valid <= done;
      entry_err <= stray;
      if (done) dyn_hash <= done_hash;

      if (accept) begin
        synced_q    <= 1'b1;
        active_q    <= !done;
        remaining_q <= bb_count - CNT_W'(1);
        acc_q       <= insn_i.opcode;
        block_addr  <= bb_addr;
      end else if (active_q && insn_i.valid) begin
        active_q    <= !done;
        remaining_q <= remaining_q - CNT_W'(1);
        acc_q       <= done_hash;
      end else if (stray) begin
        synced_q    <= 1'b0;   // resynchronise on the next block start
      end
    end
  end

  assign busy = active_q;

endmodule
