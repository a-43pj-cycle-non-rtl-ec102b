// nvmcu_pkg: types and constants shared by the memory and power subsystem of
// the non-volatile microcontroller.
//
// The word size (16 b), the memory sizes (12 KB instruction RRAM, 4 KB data
// RRAM, 256-word backup array of which 128 words hold remapped data and 128
// words hold the non-volatile copy of the remap table, 8 KB scratchpad SRAM)
// and the 5-bit majority-voted valid field of a remap-table entry follow the
// published design. The byte-address map of the core's data bus is this
// design's own choice (an MSP430-style layout with code at the top of memory).
package nvmcu_pkg;

  // Byte address map of the 16-bit data bus (this design's choice).
  localparam logic [15:0] PERIPH_BASE = 16'h0000;  // 512 B peripheral window
  localparam logic [15:0] PERIPH_END  = 16'h01FF;
  localparam logic [15:0] SRAM_BASE   = 16'h2000;  // 8 KB scratchpad SRAM
  localparam logic [15:0] SRAM_END    = 16'h3FFF;
  localparam logic [15:0] DRRAM_BASE  = 16'hC000;  // 4 KB data RRAM
  localparam logic [15:0] DRRAM_END   = 16'hCFFF;
  localparam logic [15:0] IRRAM_BASE  = 16'hD000;  // 12 KB instruction RRAM
  localparam logic [15:0] IRRAM_END   = 16'hFFFF;

  // One request on a 16-bit word bus. The requester holds it until the
  // target answers with ready for one cycle.
  typedef struct packed {
    logic        req;
    logic        we;
    logic [15:0] addr;   // byte address on the core side, word index behind a decoder
    logic [15:0] wdata;
  } bus_req_t;

  typedef struct packed {
    logic        ready;  // one-cycle pulse that ends the access
    logic        err;    // access could not be served (unmapped, or data lost)
    logic [15:0] rdata;
  } bus_rsp_t;

  // Power modes of the hardware scheduler.
  typedef enum logic [2:0] {
    PM_WAKE_PWR = 3'd0,  // supplies switched on, core held in reset
    PM_WAKE_RST = 3'd1,  // isolation released, core still in reset
    PM_ACTIVE   = 3'd2,  // core runs
    PM_SAVE     = 3'd3,  // volatile remap table copied to RRAM
    PM_OFF      = 3'd4   // core, memory controllers and memories power-gated
  } pmode_e;

  // Fault-injection command for the RRAM behavioural models (test hook).
  typedef enum logic [1:0] {
    INJ_IMEM   = 2'd0,
    INJ_DMAIN  = 2'd1,
    INJ_BACKUP = 2'd2
  } inj_sel_e;

  // Non-volatile remap-table word: five copies of the valid bit above the
  // remapped word address.
  localparam int unsigned NV_VALID_BITS = 5;

  function automatic logic majority5(input logic [4:0] v);
    int unsigned n;
    n = 0;
    for (int i = 0; i < 5; i++) n += int'(v[i]);
    return n >= 3;
  endfunction

endpackage
