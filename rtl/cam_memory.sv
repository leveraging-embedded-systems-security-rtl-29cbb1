// cam_memory: content-addressable memory of the watchdog. Each line maps the
// address of the first instruction of a basic block to the block's static
// hash (XOR of all its instruction words) and to its number of instructions.
// The table is produced by static analysis of the program and loaded before
// the program runs.
//
// Search: fully parallel and combinational. search_key is compared with the
// first_addr of every valid line; hit is set if one matches and entry_o gives
// that line (the lowest-numbered one if the loader wrote duplicates).
// Write: one line per clock through we/windex/wentry; wvalid = 0 frees a line.
// Reset clears every valid bit, so an unloaded CAM never hits.
// The mapping (first address -> hash, count) follows the described CAM; the
// write port, the number of lines and the reset are choices of this design.
module cam_memory
  import watchdog_pkg::*;
#(
  parameter int unsigned ENTRIES = CAM_ENTRIES,
  localparam int unsigned IDX_W  = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // load port
  input  logic              we,
  input  logic [IDX_W-1:0]  windex,
  input  logic              wvalid,
  input  cam_entry_t        wentry,
  // search port
  input  logic [ADDR_W-1:0] search_key,
  output logic              hit,
  output cam_entry_t        entry_o
);

  logic [ENTRIES-1:0] valid_q;
  cam_entry_t         lines_q [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
    end else if (we && (32'(windex) < ENTRIES)) begin
      valid_q[windex] <= wvalid;
    end
  end

  always_ff @(posedge clk) begin
    if (we && (32'(windex) < ENTRIES)) begin
      lines_q[windex] <= wentry;
    end
  end

  // Parallel compare, then priority select of the lowest matching line.
  logic [ENTRIES-1:0] match;
  always_comb begin
    for (int i = 0; i < ENTRIES; i++) begin
      match[i] = valid_q[i] && (lines_q[i].first_addr == search_key);
    end
  end

  always_comb begin
    hit     = 1'b0;
    entry_o = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (match[i]) begin
        hit     = 1'b1;
        entry_o = lines_q[i];
      end
    end
  end

  // A block holds at least one instruction (its closing branch).
  a_count_nonzero: assert property (@(posedge clk) disable iff (!rst_n)
    (we && wvalid) |-> (wentry.count != '0));

endmodule
