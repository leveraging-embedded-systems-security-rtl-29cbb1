// cam_access_block: turns each instruction acknowledged by the Decision Block
// into a CAM search and splits the CAM's answer between the two blocks that
// use it. On a hit, the block's first address and instruction count go to the
// Hash Builder and the block's static hash goes to the Comparison Block. It
// also reports an executed instruction whose address starts no block
// (bb_miss); the Hash Builder decides whether that matters.
//
// Interface: insn_i from the Decision Block; cam_key/cam_hit/cam_entry to and
// from the CAM; bb_* towards the Hash Builder; static_hash towards the
// Comparison Block.
// Timing: purely combinational, so the search result is available in the same
// cycle as the acknowledged instruction. Searching only acknowledged PCs
// follows the described watchdog; the combinational search is this design's
// choice.
module cam_access_block
  import watchdog_pkg::*;
(
  input  exec_insn_t        insn_i,
  // CAM search port
  output logic [ADDR_W-1:0] cam_key,
  input  logic              cam_hit,
  input  cam_entry_t        cam_entry,
  // to the Hash Builder
  output logic              bb_start,   // executed PC is the first of a block
  output logic              bb_miss,    // executed PC is the first of no block
  output logic [ADDR_W-1:0] bb_addr,
  output logic [CNT_W-1:0]  bb_count,
  // to the Comparison Block
  output logic [HASH_W-1:0] static_hash
);

  always_comb begin
    cam_key     = insn_i.pc;
    bb_start    = insn_i.valid && cam_hit;
    bb_miss     = insn_i.valid && !cam_hit;
    bb_addr     = cam_hit ? cam_entry.first_addr : '0;
    bb_count    = cam_hit ? cam_entry.count      : '0;
    static_hash = cam_hit ? cam_entry.hash       : '0;
  end

endmodule
