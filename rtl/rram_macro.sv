// rram_macro: behavioural model of a 1T1R HfOx resistive-RAM array of
// WIDTH-bit words (DEPTH words). It is not synthesizable logic for a real
// chip: the cells, sense amplifiers and write drivers are analog. The model
// keeps the digital interface of such an array so the controllers above it
// can be written and tested.
//
// Interface and timing: one port. A read (re) returns rdata on the next
// clock edge (the array's 23 ns read fits in one 100 ns cycle at 10 MHz). A
// write (we) applies one programming pulse at the clock edge (50 ns write,
// also within one cycle). Contents are non-volatile: they are kept while
// pwr_en is low, and accesses are ignored then.
//
// Write failures: each word has a count of upcoming failing writes, set
// through the inj_* test port. A failing write leaves the word with FAIL_MASK
// flipped against the written data (a cell that ended outside its resistance
// window), so a read-back verify sees the failure. A count of 4'hF is a
// permanent write failure (worn-out word); smaller counts are temporary
// write failures that disappear after that many attempts. All words start at
// zero with no failures, as after forming and initial programming. The
// failure model and the initial state are this design's own choices.
module rram_macro #(
  parameter int unsigned DEPTH     = 2048,
  parameter int unsigned WIDTH     = 16,
  parameter logic [15:0] FAIL_MASK = 16'h0001,
  localparam int unsigned AW       = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             pwr_en,
  input  logic             re,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata,
  // fault injection (test hook of the model)
  input  logic             inj_we,
  input  logic [AW-1:0]    inj_addr,
  input  logic [3:0]       inj_cnt
);

  logic [WIDTH-1:0] mem      [DEPTH];
  logic [3:0]       fail_cnt [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) begin
      mem[i]      = '0;
      fail_cnt[i] = '0;
    end
  end

  always_ff @(posedge clk) begin
    if (pwr_en && re && int'(addr) < int'(DEPTH)) rdata <= mem[addr];
    if (pwr_en && we && int'(addr) < int'(DEPTH)) begin
      if (fail_cnt[addr] != 4'd0) begin
        mem[addr] <= wdata ^ FAIL_MASK[WIDTH-1:0];
        if (fail_cnt[addr] != 4'hF) fail_cnt[addr] <= fail_cnt[addr] - 4'd1;
      end else begin
        mem[addr] <= wdata;
      end
    end
    if (inj_we && int'(inj_addr) < int'(DEPTH)) fail_cnt[inj_addr] <= inj_cnt;
  end

endmodule
