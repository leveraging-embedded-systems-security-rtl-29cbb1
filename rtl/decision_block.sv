// decision_block: first stage of the watchdog. Every cycle in which the
// processor's execution stage hands an instruction on (ex_valid), it samples
// that instruction's program counter and instruction word together with the
// pipeline's "annul" bit. An instruction that is annulled (squashed after
// speculative fetch, e.g. an annulled branch delay slot) is not acknowledged;
// every other one is passed on as an executed instruction to the CAM Access
// Block and the Hash Builder.
//
// Interface: ex_valid/ex_annul/ex_pc/ex_opcode from the execution stage;
// insn_o is the registered, acknowledged instruction (insn_o.valid = 1 for
// exactly one cycle per executed instruction).
// Timing: one register stage, insn_o follows the inputs by one clock.
// Watching the annul bit and the PC of the execution stage follows the
// described watchdog; the ex_valid qualifier (pipeline hold) and taking the
// instruction word alongside the PC are choices of this design.
module decision_block
  import watchdog_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ex_valid,   // an instruction leaves the execution stage
  input  logic              ex_annul,   // ... but will be discarded
  input  logic [ADDR_W-1:0] ex_pc,
  input  logic [INSN_W-1:0] ex_opcode,
  output exec_insn_t        insn_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      insn_o <= '0;
    end else begin
      insn_o.valid <= ex_valid && !ex_annul;
      if (ex_valid && !ex_annul) begin
        insn_o.pc     <= ex_pc;
        insn_o.opcode <= ex_opcode;
      end
    end
  end

endmodule
