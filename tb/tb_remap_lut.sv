// tb_remap_lut: checks the volatile remap table. In-order slot allocation,
// associative lookup hits and misses, invalidation, the full flag after 128
// allocations, the first-dirty scan used by the save, dirty clearing, load
// from the non-volatile copy (which moves the next free slot) and clear.
module tb_remap_lut;
  logic clk = 0, rst_n = 0, clear = 0;
  logic [10:0] lk_addr, alloc_addr, ld_addr, fd_addr;
  logic lk_hit, alloc = 0, full, inv = 0, ld = 0, ld_valid = 0, fd_any, fd_valid, clr_dirty = 0;
  logic [6:0] lk_idx, alloc_idx, inv_idx = 0, ld_idx = 0, fd_idx, clr_idx = 0;
  logic [7:0] used;
  int checks = 0, failures = 0;
  logic [10:0] addrs [128];

  remap_lut #(.ENTRIES(128), .AW(11)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic look(input logic [10:0] a, input logic hit, input int idx, input string what);
    lk_addr = a; #1;
    chk(lk_hit == hit && (!hit || int'(lk_idx) == idx),
        $sformatf("%s: addr %0d hit %0d idx %0d", what, a, lk_hit, lk_idx));
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    lk_addr = 0; alloc_addr = 0; ld_addr = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    chk(!fd_any && !full && alloc_idx == 0, "empty after reset");
    for (int i = 0; i < 128; i++) addrs[i] = 11'(i * 13 + 7);
    for (int i = 0; i < 128; i++) begin
      chk(int'(alloc_idx) == i && !full, $sformatf("slot %0d offered", i));
      alloc = 1; alloc_addr = addrs[i];
      @(negedge clk); alloc = 0;
    end
    chk(full && used == 8'd128, "full after 128 allocations");
    for (int i = 0; i < 128; i += 9) look(addrs[i], 1, i, "hit");
    look(11'd1, 0, 0, "miss");
    // invalidate slot 5
    @(negedge clk); inv = 1; inv_idx = 7'd5; @(negedge clk); inv = 0;
    look(addrs[5], 0, 0, "invalidated");
    // all entries are dirty: the scan offers 0 first
    chk(fd_any && fd_idx == 0 && fd_valid && fd_addr == addrs[0], "first dirty is 0");
    @(negedge clk);
    for (int i = 0; i < 5; i++) begin clr_dirty = 1; clr_idx = 7'(i); @(negedge clk); end
    clr_dirty = 0; #1;
    chk(fd_idx == 5 && !fd_valid && fd_addr == addrs[5], "dirty invalid entry 5 offered next");
    @(negedge clk);
    for (int i = 5; i < 128; i++) begin clr_dirty = 1; clr_idx = 7'(i); @(negedge clk); end
    clr_dirty = 0; #1;
    chk(!fd_any, "no dirty entry left");
    // clear (power-gated) empties the table
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    look(addrs[3], 0, 0, "cleared");
    chk(!full && alloc_idx == 0, "empty after clear");
    // restore entries 0..9, 7 invalid
    @(negedge clk);
    for (int i = 0; i < 10; i++) begin
      ld = 1; ld_idx = 7'(i); ld_valid = (i != 7); ld_addr = addrs[i];
      @(negedge clk);
    end
    ld = 0; #1;
    look(addrs[2], 1, 2, "restored");
    look(addrs[7], 0, 0, "restored invalid");
    chk(alloc_idx == 10 && !fd_any, "next free after restore, nothing dirty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
