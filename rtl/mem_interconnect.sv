// mem_interconnect: address decoder of the core's 16-bit data bus.
//
// The core's data accesses go to the peripheral ports (off-chip sensors and
// other devices), the 8 KB scratchpad SRAM or the 4 KB data RRAM, chosen by
// the byte address (map in nvmcu_pkg: peripherals 0x0000-0x01FF, SRAM
// 0x2000-0x3FFF, data RRAM 0xC000-0xCFFF). The request is passed to the one
// target with its word index (byte address minus base, halved) and the
// target's response is returned. Any other address is answered in the next
// cycle with err set and zero data. The address map and the error response
// are this design's choices; the set of targets follows the published chip.
//
// Protocol: the requester holds req, we, addr and wdata until ready; the
// decoder is combinational, so it adds no cycle.
module mem_interconnect
  import nvmcu_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t core_i,
  output bus_rsp_t core_o,
  output bus_req_t periph_o,
  input  bus_rsp_t periph_i,
  output bus_req_t sram_o,
  input  bus_rsp_t sram_i,
  output bus_req_t drram_o,
  input  bus_rsp_t drram_i
);

  typedef enum logic [1:0] {T_PERIPH, T_SRAM, T_DRRAM, T_NONE} target_e;
  target_e tgt;
  logic    err_q;

  always_comb begin
    if (core_i.addr <= PERIPH_END)                              tgt = T_PERIPH;
    else if (core_i.addr >= SRAM_BASE  && core_i.addr <= SRAM_END)  tgt = T_SRAM;
    else if (core_i.addr >= DRRAM_BASE && core_i.addr <= DRRAM_END) tgt = T_DRRAM;
    else                                                        tgt = T_NONE;
  end

  function automatic bus_req_t local_req(input bus_req_t r, input logic sel,
                                         input logic [15:0] base);
    bus_req_t o;
    o       = r;
    o.req   = r.req && sel;
    o.addr  = (r.addr - base) >> 1;
    return o;
  endfunction

  always_comb begin
    periph_o = local_req(core_i, tgt == T_PERIPH, PERIPH_BASE);
    sram_o   = local_req(core_i, tgt == T_SRAM,   SRAM_BASE);
    drram_o  = local_req(core_i, tgt == T_DRRAM,  DRRAM_BASE);
    unique case (tgt)
      T_PERIPH: core_o = periph_i;
      T_SRAM:   core_o = sram_i;
      T_DRRAM:  core_o = drram_i;
      default:  core_o = '{ready: err_q, err: err_q, rdata: '0};
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) err_q <= 1'b0;
    else        err_q <= core_i.req && tgt == T_NONE && !err_q;
  end

  a_req_held: assert property (@(posedge clk) disable iff (!rst_n)
    core_i.req && !core_o.ready |=> core_i.req && $stable(core_i.addr));

endmodule
