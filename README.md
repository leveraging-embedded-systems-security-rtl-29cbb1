# Basic-block hash watchdog for run-time attack detection

Code-injection attacks all end the same way: the processor runs instructions
that are not the ones the program was compiled into. A stack-smashing buffer
overflow overwrites a return address and the processor returns into the
attacker's code. A DMA-capable device writes new code into program memory. A
hardware Trojan quietly changes an instruction word. This watchdog catches all
three in hardware, alongside the processor. It needs no recompilation of the
program, no operating system and no change to the processor pipeline beyond
tapping a few signals.

The main idea is to split the program into **basic blocks**: straight-line
runs of instructions that end in a branch. Before the program runs, a
**content-addressable memory (CAM)** is loaded with one line per block:

| field        | meaning                                                    |
|--------------|------------------------------------------------------------|
| `first_addr` | address of the block's first instruction (the CAM key)     |
| `hash`       | XOR of all instruction words of the block (*static hash*) |
| `count`      | number of instructions in the block                        |

At run time the watchdog looks at each instruction that leaves the processor's
execution stage. When an executed PC matches a `first_addr`, the watchdog XORs
that instruction word and the next `count - 1` executed words into a *dynamic
hash*. It then compares the dynamic hash with the static one. If they differ,
the code that ran is not the code that was analysed, and the watchdog raises
an error to the processor.

The RTL targets a 32-bit SPARC V8 processor of the LEON3 kind, so PCs and
instruction words are 32 bits wide. The processor, its AMBA bus and the
static-analysis tool that fills the CAM are not part of this RTL.

## How a block is checked

The watchdog is a four-stage chain, one module per stage:

```
 ex_valid, ex_annul,      +----------------+  insn   +------------------+  bb_start/miss, addr, count
 ex_pc, ex_opcode ------->| decision_block |-------->| cam_access_block |-----------------------+
                          +----------------+    |    +------------------+                       v
                                                |        | key    ^ hit, line           +--------------+
                                                |        v        |                     | hash_builder |
                                                |      +------------+                   +--------------+
                                                |      | cam_memory |<-- cam_* load         | accept, dyn_valid,
                                                |      +------------+                       | dyn_hash, entry_err
                                                |                static_hash                v
                                                +----------------------------------->+------------------+
                                                                                     | comparison_block |--> error_irq,
                                                                                     +------------------+    error_cause,
                                                                                                             attack_detected
```

1. **Decision Block** (`decision_block`). In a cycle where `ex_valid` is high,
   an instruction leaves the execution stage. The block registers its PC and
   instruction word. The instruction is *acknowledged* only if the pipeline's
   `ex_annul` bit is low. Annulled instructions were fetched speculatively and
   are discarded, so they are neither hashed nor counted.
2. **CAM Access Block** (`cam_access_block`). This block searches the CAM with
   the acknowledged PC, in the same cycle. On a hit it sends the block's first
   address and count to the Hash Builder and the static hash to the Comparison
   Block. On a miss it reports `bb_miss`.
3. **Hash Builder** (`hash_builder`). This block has two states.
   * *Idle*: a block start (CAM hit) is **accepted**. The block's first
     instruction word becomes the running hash and the counter is loaded with
     `count - 1`. A block with a count of 1 finishes in the same cycle.
   * *Busy*: every acknowledged instruction is XORed in and counted, whatever
     its address. This includes an address that starts another block. When the
     counter runs out, the dynamic hash is handed on (`dyn_valid`).

   If an attack makes the processor leave a block early and jump into other
   code, that code is hashed as part of the block, and the hash does not match.
4. **Comparison Block** (`comparison_block`). This block latches the static
   hash when a block is accepted. It compares that hash with the dynamic hash
   when the dynamic hash arrives. When the two are equal it only pulses
   `block_ok`. When they differ it pulses `attack_detected` and sets
   `error_irq` and bit 0 of `error_cause`. Both stay set until `irq_clear`.

Because the static hash is latched at acceptance, a new block can start in the
same cycle that the previous block is compared. The watchdog therefore runs at
one instruction per clock and never stalls the processor.

### The entry check

A hash comparison alone misses one important case: a changed return address
that points into injected code, or into the middle of a genuine block. That
code never starts a block, so nothing would be hashed. The program, however,
is divided into blocks with no gaps, and every block ends in a branch.
Between two blocks, the next executed instruction must therefore start a block.

With `CHECK_ENTRY = 1` (the default), the Hash Builder enforces this rule. It
applies once a first block has been accepted after reset. From then on, an
acknowledged instruction that arrives while the builder is idle and misses the
CAM raises `entry_err`. The Comparison Block turns this into `attack_detected`
and sets `error_cause` bit 1. The builder then drops its synchronisation and
ignores code until the next block start, so one bad entry gives one alarm and
not one per instruction.

Code run after reset and before the first block start is not checked. This lets
boot code outside the protected program run freely. With `CHECK_ENTRY = 0`,
only hash mismatches are reported.

### Timing

Let an instruction be presented on the `ex_*` inputs in clock cycle *n*:

| cycle | what happens                                                        |
|-------|---------------------------------------------------------------------|
| n     | instruction on `ex_*`                                              |
| n+1   | acknowledged (registered), CAM searched, hash/count updated         |
| n+2   | `dyn_valid` / `entry_err` (if *n* was a block's last or a stray insn)|
| n+3   | `block_ok` or `attack_detected` pulse; `error_irq` set             |

So an error is signalled three clocks after the last instruction of the bad
block, or three clocks after the first stray instruction. Counted from the
tampered instruction, the latency is its distance to the end of its block plus
three clocks. For blocks of a few to a few tens of instructions, that is
between a few and a few tens of cycles. Stall cycles (`ex_valid = 0`) and
annulled instructions add to the wall-clock latency but are not counted.

## Filling the CAM

The CAM contents come from static analysis of the program binary, which can
be done without recompiling:

* Split the code at every control-transfer instruction. A block starts at the
  program entry, at every branch or call target, and right after the end of
  the previous block. On SPARC a block ends with the delay-slot instruction
  that follows its branch.
* For block *b* with words *w₀ … w_{k−1}*, write
  `first_addr = address(w₀)`, `hash = w₀ ^ w₁ ^ … ^ w_{k−1}`, `count = k`.
* Load one line per clock: `cam_we = 1`, `cam_windex` = line number,
  `cam_wvalid = 1`, and the three fields. `cam_wvalid = 0` frees a line.
  Reset frees every line. If two lines have the same key, the lower line wins.

`count` must be between 1 and 255 (an assertion flags 0). A block longer than
255 instructions has to be split into two CAM lines.

## Limits of the scheme

These follow from the check itself. Keep them in mind when protecting real
code.

* **Annulled delay slots.** A SPARC branch with the annul bit set discards its
  delay slot when it is not taken. The Decision Block does not count a
  discarded instruction. The run-time count of such a block can therefore be
  one short of the static count, and the block would absorb the next
  instruction. Give such blocks special treatment in the static analysis, or
  avoid annulling branches in protected code.
* **Traps and interrupts.** A trap handler entered in the middle of a block is
  hashed into that block. A handler entered between blocks is a CAM miss. The
  handlers must be analysed too and their entry points listed, or the
  watchdog must be reset around them.
* **XOR hash strength.** One changed instruction always changes the hash.
  Changes that cancel in the XOR, such as two identical words swapped, or
  one instruction replaced by another with the same word, are not seen.
* **Code before synchronisation** is not checked, as described above.
* **Reuse of genuine blocks.** A hijacked jump or return that lands exactly on
  the start of a genuine block, and runs it to its end, passes both checks.
  The watchdog verifies *what* code runs, not the order in which blocks run.
* **CAM capacity.** The default of 256 lines covers a program of up to 256
  basic blocks. The `ENTRIES` parameter scales it.

## Files

| file | content |
|------|---------|
| `rtl/watchdog_pkg.sv` | widths, `exec_insn_t` (acknowledged instruction), `cam_entry_t` (CAM line), `err_cause_t` |
| `rtl/decision_block.sv` | PC / instruction / annul sampling |
| `rtl/cam_memory.sv` | parallel-search CAM with load port |
| `rtl/cam_access_block.sv` | CAM search and routing of its answer |
| `rtl/hash_builder.sv` | XOR hash and instruction counter, entry check |
| `rtl/comparison_block.sv` | hash comparison and error indication |
| `rtl/watchdog.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

### Top-level ports (`watchdog`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `ex_valid` | in | 1 | an instruction leaves the execution stage this cycle |
| `ex_annul` | in | 1 | that instruction is annulled (discarded) |
| `ex_pc` | in | 32 | its PC |
| `ex_opcode` | in | 32 | its instruction word |
| `cam_we`, `cam_windex`, `cam_wvalid` | in | 1, log2(ENTRIES), 1 | CAM load strobe, line, used/free |
| `cam_wfirst_addr`, `cam_whash`, `cam_wcount` | in | 32, 32, 8 | CAM line contents |
| `irq_clear` | in | 1 | acknowledge and clear the error |
| `error_irq` | out | 1 | error indication to the processor (sticky) |
| `error_cause` | out | 2 | bit 0 hash mismatch, bit 1 bad entry (sticky) |
| `attack_detected` | out | 1 | one-cycle pulse per detected event |
| `block_ok` | out | 1 | one-cycle pulse per block whose hashes matched |
| `busy`, `block_addr` | out | 1, 32 | a block is being hashed, and its first address |

Parameters: `ENTRIES` (CAM lines, default 256) and `CHECK_ENTRY` (default 1).
The word widths are constants of `watchdog_pkg` (address 32, instruction 32,
hash 32, count 8).

## What is given and what is chosen

The following parts follow the published scheme this design implements:

* the split into Decision, CAM Access, Hash Builder and Comparison blocks
  around a CAM;
* the use of the execution stage's PC and annul bit;
* the CAM line of first address, static hash and instruction count;
* the XOR hash;
* an error indication to the processor on a mismatch.

The following are choices of this design:

* the `ex_valid` qualifier, and taking the instruction word with the PC;
* the widths of the count field and the hash;
* the CAM size, its load port and its combinational search;
* the register stages, and with them the three-cycle latency;
* how a block start inside a running block is treated;
* the entry check, with its resynchronisation;
* the sticky interrupt with a cause field and a clear input.

The published scheme also mentions mapping a block's first *and last*
addresses. This design uses the first address plus an instruction count
instead.

For scale, a reference implementation of the watchdog body (without its CAM)
next to a LEON3 on a Spartan-3E used 135 flip-flops and 109 LUTs. This RTL
holds 210 flip-flop bits outside the CAM:

| part | flip-flop bits |
|------|----------------|
| registered instruction | 65 |
| hash builder | 108 |
| comparison block | 37 |

The CAM adds 256 valid bits and a 256 × 72-bit line array, with 256 parallel
32-bit comparators. Dropping the input register, by feeding the CAM straight
from the pipeline, would bring the body close to the reference size at the
cost of a longer combinational path.

## Verification

Every module has a self-checking testbench that compares its outputs with
values the testbench computes on its own. Each testbench prints
`TB_RESULT checks=N failures=M`.

* `tb_decision_block`: random instructions, stalls and annulled
  instructions. Checks acknowledgement and data.
* `tb_cam_memory`: fills all 256 lines and compares searches with a table
  model. Covers hits, misses, overwritten and freed lines, duplicate keys and
  reset.
* `tb_cam_access_block`: checks routing and start/miss decisions.
* `tb_hash_builder`: 600 random blocks with stalls, one-instruction blocks,
  block starts inside blocks and stray code. A reference model predicts every
  output in every cycle, with the entry check both on and off.
* `tb_comparison_block`: random static and dynamic hashes, entry errors and
  clears. Checks the sticky interrupt and its cause bits.
* `tb_watchdog` (end to end, default parameters). It builds a random
  256-block program, computes its hashes, loads the full CAM and runs about
  760 blocks in random control flow. Stalls and annulled instructions are
  mixed in. It launches 40 attacks:
  * altered instruction words;
  * returns into injected code;
  * returns into the middle of a block;
  * injected early exits into another block;
  * removed instructions.

  A cycle-level reference model checks `block_ok` and `attack_detected` in
  every cycle. The testbench checks that every attack is detected, that
  detection lands exactly three cycles after the block end or the stray
  instruction, and that the error clears. It also counts each mechanism and
  fails if any never occurs: start, match, mismatch, bad entry, stall, annul,
  one-instruction block, nested start, resynchronisation and clear.

* `tb_attack_scenarios` runs the watchdog at default size on a small program
  written in real SPARC V8 encodings. The program has a main routine, a
  string-copy function with a 16-byte stack buffer and no bounds check, and a
  handler called through a function pointer. Clean runs raise nothing. Four
  attacks must each be caught in the exact predicted cycle:
  * a 24-byte input smashes the saved return address, and `ret` lands in
    shellcode in the buffer (caught 3 cycles after the first injected
    instruction);
  * an overwritten function pointer sends `jmpl` into injected code (also 3
    cycles);
  * a DMA write replaces a store in the copy loop (caught at the end of that
    loop iteration);
  * a hardware Trojan flips a bit of a branch instruction as it is fetched.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -y rtl rtl/watchdog_pkg.sv \
          tb/tb_watchdog.sv --top-module tb_watchdog -o sim
./obj_dir/sim
```

Replace `tb_watchdog` with any other testbench name. Each one finishes in well
under a second. The RTL is plain synthesizable SystemVerilog-2017, and the
only assertion is the CAM's count check.
