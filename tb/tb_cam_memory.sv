// tb_cam_memory: loads the CAM with random basic-block lines, keeps the same
// table in the testbench and checks searches for stored first addresses,
// absent addresses, overwritten and freed lines, duplicate keys (lowest line
// wins) and the reset state.
module tb_cam_memory;
  import watchdog_pkg::*;

  localparam int unsigned N = CAM_ENTRIES;
  localparam int unsigned IW = $clog2(N);

  logic clk = 1'b0, rst_n = 1'b0;
  logic we = 1'b0, wvalid = 1'b0;
  logic [IW-1:0] windex = '0;
  cam_entry_t wentry = '0, entry_o;
  logic [ADDR_W-1:0] key = '0;
  logic hit;

  int checks = 0, failures = 0;

  cam_memory dut (.clk, .rst_n, .we, .windex, .wvalid, .wentry,
                  .search_key(key), .hit, .entry_o);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog_timer
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cam_entry_t model [N];
  bit         mvalid [N];

  task automatic write_line(input int idx, input bit v, input cam_entry_t e);
    @(negedge clk);
    we = 1'b1; windex = IW'(idx); wvalid = v; wentry = e;
    @(negedge clk);
    we = 1'b0;
    model[idx] = e; mvalid[idx] = v;
  endtask

  // Reference search: lowest valid line whose key matches.
  task automatic search_check(input logic [ADDR_W-1:0] k);
    int found;
    found = -1;
    for (int i = 0; i < N; i++)
      if (found < 0 && mvalid[i] && model[i].first_addr == k) found = i;
    key = k;
    #1;
    check(hit == (found >= 0), "hit flag");
    if (found >= 0) check(entry_o == model[found], "entry contents");
  endtask

  initial begin
    cam_entry_t e;
    for (int i = 0; i < N; i++) begin
      mvalid[i] = 1'b0;
      model[i]  = '0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // Unloaded CAM never hits.
    for (int i = 0; i < 20; i++) search_check($urandom);
    search_check('0);
    // Fill every line with a distinct, word-aligned block address.
    for (int i = 0; i < N; i++) begin
      e.first_addr = 32'h4000_0000 + 32'(i) * 32'h40 + 32'($urandom_range(0, 7) * 4);
      e.hash       = $urandom;
      e.count      = CNT_W'($urandom_range(1, 255));
      write_line(i, 1'b1, e);
    end
    for (int i = 0; i < N; i++) search_check(model[i].first_addr);
    for (int i = 0; i < 200; i++) search_check(32'h4000_0000 + 32'($urandom_range(0, N * 16 - 1)) * 4);
    // Overwrite and free lines.
    for (int i = 0; i < 30; i++) begin
      int idx;
      logic [ADDR_W-1:0] old;
      idx = $urandom_range(0, N - 1);
      old = model[idx].first_addr;
      e.first_addr = 32'h9000_0000 + 32'($urandom_range(0, 1000)) * 4;
      e.hash = $urandom; e.count = CNT_W'($urandom_range(1, 255));
      write_line(idx, ($urandom_range(0, 1) == 1), e);
      search_check(old);
      search_check(e.first_addr);
    end
    // Duplicate key: the lower line must win.
    e.first_addr = 32'hCAFE_0000; e.hash = 32'h1111_1111; e.count = 8'd3;
    write_line(N - 1, 1'b1, e);
    e.hash = 32'h2222_2222; e.count = 8'd4;
    write_line(5, 1'b1, e);
    search_check(32'hCAFE_0000);
    check(entry_o.hash == 32'h2222_2222, "duplicate key: lowest line wins");
    // Reset empties the CAM.
    rst_n = 1'b0;
    #1;
    for (int i = 0; i < N; i++) mvalid[i] = 1'b0;
    search_check(32'hCAFE_0000);
    check(hit == 1'b0, "reset clears all lines");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
