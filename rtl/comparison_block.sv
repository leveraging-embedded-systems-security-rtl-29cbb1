// comparison_block: decides whether an attack happened. It keeps the static
// hash of the block the Hash Builder has just accepted and, when the Hash
// Builder delivers that block's dynamic hash, compares the two. Equal hashes
// take no action (check_ok pulses); different hashes, or an entry error from
// the Hash Builder, raise the error indication to the processor.
//
// Outputs: attack_detected is a one-cycle pulse per detected event;
// error_irq is a level that stays set, with error_cause telling which checks
// fired since the last clear, until irq_clear. All outputs are registered,
// one clock after dyn_valid / entry_err.
// Comparing static against dynamic hash and signalling the processor follows
// the described watchdog; the sticky interrupt, its clear input and the cause
// field are choices of this design.
module comparison_block
  import watchdog_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              accept,       // latch static_hash
  input  logic [HASH_W-1:0] static_hash,
  input  logic              dyn_valid,
  input  logic [HASH_W-1:0] dyn_hash,
  input  logic              entry_err,
  input  logic              irq_clear,
  output logic              check_ok,
  output logic              attack_detected,
  output logic              error_irq,
  output err_cause_t        error_cause
);

  logic [HASH_W-1:0] static_q;
  logic              mismatch;

  assign mismatch = dyn_valid && (dyn_hash != static_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      static_q        <= '0;
      check_ok        <= 1'b0;
      attack_detected <= 1'b0;
      error_irq       <= 1'b0;
      error_cause     <= CAUSE_NONE;
    end else begin
      if (accept) static_q <= static_hash;
      check_ok        <= dyn_valid && !mismatch;
      attack_detected <= mismatch || entry_err;
      if (mismatch || entry_err) begin
        error_irq   <= 1'b1;
        error_cause <= err_cause_t'((irq_clear ? 2'b00 : error_cause) |
                                    {entry_err, mismatch});
      end else if (irq_clear) begin
        error_irq   <= 1'b0;
        error_cause <= CAUSE_NONE;
      end
    end
  end

endmodule
