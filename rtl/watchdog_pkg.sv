// watchdog_pkg: widths, constants and types shared by the attack-detection
// watchdog. The watchdog observes a 32-bit SPARC V8 processor, so program
// counters and instruction words are 32 bits wide and the XOR hash of a basic
// block is as wide as an instruction word (all three follow the processor the
// design targets). The 8-bit instruction count per basic block and the
// 256-entry CAM are this design's own choices: the CAM size depends on the
// number of basic blocks in the protected program.
package watchdog_pkg;

  localparam int unsigned ADDR_W      = 32;   // program counter width
  localparam int unsigned INSN_W      = 32;   // instruction word width
  localparam int unsigned HASH_W      = INSN_W; // XOR of opcodes
  localparam int unsigned CNT_W       = 8;    // instructions per basic block
  localparam int unsigned CAM_ENTRIES = 256;  // basic blocks held by the CAM

  // One instruction as acknowledged by the Decision Block.
  typedef struct packed {
    logic              valid;   // instruction really executed (not annulled)
    logic [ADDR_W-1:0] pc;
    logic [INSN_W-1:0] opcode;
  } exec_insn_t;

  // One CAM line: key is the address of the block's first instruction.
  typedef struct packed {
    logic [ADDR_W-1:0] first_addr;
    logic [HASH_W-1:0] hash;
    logic [CNT_W-1:0]  count;
  } cam_entry_t;

  // Why the error indication was raised.
  typedef enum logic [1:0] {
    CAUSE_NONE     = 2'b00,
    CAUSE_HASH     = 2'b01,  // dynamic hash differs from static hash
    CAUSE_ENTRY    = 2'b10,  // code entered at an address that starts no block
    CAUSE_BOTH     = 2'b11
  } err_cause_t;

endpackage
