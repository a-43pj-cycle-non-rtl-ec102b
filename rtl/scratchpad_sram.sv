// scratchpad_sram: the 8 KB (4096 x 16 b) volatile scratchpad of the
// microcontroller, holding loop counters and temporaries that are written
// often and so are kept out of the RRAM.
//
// Interface: a word bus (nvmcu_pkg::bus_req_t / bus_rsp_t) whose addr field
// is the word index. Every request is answered one cycle later with ready;
// a read returns the word, a write stores it. Single-cycle access and the
// bus protocol are this design's choice; the size follows the published chip.
// The contents are not kept across a power-gated shutdown; software keeps
// nothing here that must survive one.
module scratchpad_sram
  import nvmcu_pkg::*;
#(
  parameter int unsigned WORDS = 4096
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t bus_i,
  output bus_rsp_t bus_o
);

  localparam int unsigned AW = $clog2(WORDS);

  logic [15:0] mem [WORDS];
  logic        pend_q;
  logic [15:0] rdata_q;
  wire  [AW-1:0] idx = bus_i.addr[AW-1:0];

  always_ff @(posedge clk) begin
    if (bus_i.req && !pend_q && bus_i.we) mem[idx] <= bus_i.wdata;
    if (bus_i.req && !pend_q)            rdata_q  <= mem[idx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pend_q <= 1'b0;
    else        pend_q <= bus_i.req && !pend_q;
  end

  assign bus_o.ready = pend_q;
  assign bus_o.err   = 1'b0;
  assign bus_o.rdata = rdata_q;

endmodule
