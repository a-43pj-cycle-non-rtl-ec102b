// remap_lut: the volatile look-up table of dynamic address remapping.
//
// Entry i says that data-RRAM word addr[i] now lives in slot i of the backup
// RRAM array. The table has ENTRIES (128) entries held in flip-flops, as
// published. It is looked up associatively in the same cycle as the access
// (lk_*), so a remapped word costs no extra cycle to find.
//
// Slots are handed out in order (alloc_*): the next free slot is the one
// after the highest slot in use. A slot whose write failed is invalidated
// (inv_*) and is not handed out again until the next restore. Every change
// marks the entry dirty; the first dirty entry is offered on fd_* so the
// controller can copy only changed entries into the non-volatile table
// before shutdown, and clears the mark with clr_dirty. On wake-up the
// controller refills the table through ld_* from the non-volatile copy.
// clear empties the table (its flip-flops lose their state when the memory
// controllers are power-gated). The in-order allocation, the dirty marks and
// the find-first-dirty scan are this design's choices.
module remap_lut #(
  parameter int unsigned ENTRIES = 128,
  parameter int unsigned AW      = 11,
  localparam int unsigned IW     = $clog2(ENTRIES)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  // associative lookup
  input  logic [AW-1:0] lk_addr,
  output logic          lk_hit,
  output logic [IW-1:0] lk_idx,
  // allocation of the next free slot to an address
  input  logic          alloc,
  input  logic [AW-1:0] alloc_addr,
  output logic          full,
  output logic [IW-1:0] alloc_idx,
  // invalidation of one entry
  input  logic          inv,
  input  logic [IW-1:0] inv_idx,
  // load of one entry from the non-volatile table (restore)
  input  logic          ld,
  input  logic [IW-1:0] ld_idx,
  input  logic          ld_valid,
  input  logic [AW-1:0] ld_addr,
  // first dirty entry, for the save to the non-volatile table
  output logic          fd_any,
  output logic [IW-1:0] fd_idx,
  output logic          fd_valid,
  output logic [AW-1:0] fd_addr,
  input  logic          clr_dirty,
  input  logic [IW-1:0] clr_idx,
  output logic [IW:0]   used
);

  logic [ENTRIES-1:0] valid_q, dirty_q;
  logic [AW-1:0]      addr_q [ENTRIES];
  logic [IW:0]        next_q;   // next slot to hand out; ENTRIES when full

  always_comb begin
    lk_hit = 1'b0;
    lk_idx = '0;
    for (int i = 0; i < int'(ENTRIES); i++) begin
      if (valid_q[i] && addr_q[i] == lk_addr) begin
        lk_hit = 1'b1;
        lk_idx = IW'(i);
      end
    end
  end

  always_comb begin
    fd_any = 1'b0;
    fd_idx = '0;
    for (int i = int'(ENTRIES) - 1; i >= 0; i--) begin
      if (dirty_q[i]) begin
        fd_any = 1'b1;
        fd_idx = IW'(i);
      end
    end
    fd_valid = valid_q[fd_idx];
    fd_addr  = addr_q[fd_idx];
  end

  assign full      = (next_q == (IW+1)'(ENTRIES));
  assign alloc_idx = next_q[IW-1:0];
  assign used      = next_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      dirty_q <= '0;
      next_q  <= '0;
      for (int i = 0; i < int'(ENTRIES); i++) addr_q[i] <= '0;
    end else if (clear) begin
      valid_q <= '0;
      dirty_q <= '0;
      next_q  <= '0;
    end else begin
      if (clr_dirty) dirty_q[clr_idx] <= 1'b0;
      if (inv) begin
        valid_q[inv_idx] <= 1'b0;
        dirty_q[inv_idx] <= 1'b1;
      end
      if (alloc && !full) begin
        valid_q[alloc_idx] <= 1'b1;
        dirty_q[alloc_idx] <= 1'b1;
        addr_q[alloc_idx]  <= alloc_addr;
        next_q             <= next_q + 1'b1;
      end
      if (ld) begin
        valid_q[ld_idx] <= ld_valid;
        dirty_q[ld_idx] <= 1'b0;
        addr_q[ld_idx]  <= ld_addr;
        if (ld_valid && {1'b0, ld_idx} >= next_q) next_q <= {1'b0, ld_idx} + 1'b1;
      end
    end
  end

endmodule
