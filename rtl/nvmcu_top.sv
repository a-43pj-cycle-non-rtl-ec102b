// nvmcu_top: memory and power subsystem of a 16-bit non-volatile
// microcontroller with on-chip resistive RAM (RRAM).
//
// The chip keeps everything that must survive a power-down in RRAM, so it
// can cut its power between sensor samples and resume in 2 cycles. It holds
// a 12 KB instruction RRAM (fetch port for the core, program port for
// loading the code), a 4 KB data RRAM behind ENDURER (periodic random
// remapping against wear) and the data-RRAM controller (write-verify with 4
// retries, dynamic remapping of failing words to a 256-word backup RRAM, a
// volatile remap table saved to RRAM before shutdown and restored at
// wake-up), an 8 KB scratchpad SRAM, the data-bus decoder, and the hardware
// scheduler that sequences shutdown and wake-up. A multi-level-cell weight
// codec (two 5-level cells for a magnitude, one 2-level cell for the sign)
// is brought out on its own ports.
//
// The MSP430-compatible core, the peripherals and the power switches are
// outside this module: the core connects to the fetch port (ifetch_*) and
// the data bus (core_req_i/core_rsp_o, byte addresses), and takes
// core_pwr_en and core_rst_n; shutdown_req is its request to sleep and
// wake_evt the data-arrival event. mem_pwr_en and iso_en drive the switches
// and isolation of the memory domain. The inj_* ports are test hooks that
// reach the write-failure models of the RRAM arrays (inj_sel: 0 instruction
// RRAM, 1 data RRAM, 2 backup array).
//
// Sizes follow the published chip; the address map, the bus protocol and
// the handshakes are this design's own (see the module headers below).
module nvmcu_top
  import nvmcu_pkg::*;
#(
  parameter int unsigned     IMEM_WORDS      = 6144,
  parameter int unsigned     DMEM_WORDS      = 2048,
  parameter int unsigned     BACKUP_WORDS    = 256,
  parameter int unsigned     LUT_ENTRIES     = 128,
  parameter int unsigned     SRAM_WORDS      = 4096,
  parameter int unsigned     DMEM_RETRIES    = 4,
  parameter int unsigned     IMEM_RETRIES    = 8,
  parameter int unsigned     ENDURER_BUF     = 8,
  parameter longint unsigned ENDURER_PERIOD  = 64'd18_000_000_000,
  localparam int unsigned    IAW = $clog2(IMEM_WORDS),
  localparam int unsigned    DAW = $clog2(DMEM_WORDS),
  localparam int unsigned    LIW = $clog2(LUT_ENTRIES)
) (
  input  logic                clk,
  input  logic                rst_n,
  // core instruction fetch (byte address in the 0xD000-0xFFFF window)
  input  logic                ifetch_req,
  input  logic [15:0]         ifetch_addr,
  output logic [15:0]         ifetch_data,
  output logic                ifetch_valid,
  // core data bus
  input  bus_req_t            core_req_i,
  output bus_rsp_t            core_rsp_o,
  // peripheral port
  output bus_req_t            periph_req_o,
  input  bus_rsp_t            periph_rsp_i,
  // instruction RRAM programming port (word index)
  input  logic                prog_req,
  input  logic [IAW-1:0]      prog_addr,
  input  logic [15:0]         prog_wdata,
  output logic                prog_busy,
  output logic                prog_done,
  output logic                prog_ok,
  // power management
  input  logic                shutdown_req,
  input  logic                wake_evt,
  output logic                core_pwr_en,
  output logic                core_rst_n,
  output logic                mem_pwr_en,
  output logic                iso_en,
  output pmode_e              mode,
  // status
  output logic                restore_busy,
  output logic                endurer_busy,
  output logic [DAW-1:0]      endurer_key,
  output logic                endurer_evt,
  output logic                remap_evt,
  output logic                nvlut_inval_evt,
  output logic                lost_evt,
  output logic [LIW:0]        lut_used,
  // multi-level-cell weight codec
  input  logic signed [5:0]   mlc_enc_weight,
  output logic                mlc_enc_sign,
  output logic [2:0]          mlc_enc_hi,
  output logic [2:0]          mlc_enc_lo,
  input  logic                mlc_dec_sign,
  input  logic [2:0]          mlc_dec_hi,
  input  logic [2:0]          mlc_dec_lo,
  output logic signed [5:0]   mlc_dec_weight,
  // write-failure injection into the RRAM models (test hook)
  input  logic                inj_we,
  input  inj_sel_e            inj_sel,
  input  logic [15:0]         inj_addr,
  input  logic [3:0]          inj_cnt
);

  logic     save_req, save_done, restore_req;
  bus_req_t sram_req, drram_req, dmem_req;
  bus_rsp_t sram_rsp, drram_rsp, dmem_rsp;
  logic     run_endurer;

  power_scheduler u_sched (
    .clk, .rst_n, .shutdown_req, .wake_evt, .endurer_busy,
    .save_req, .save_done, .restore_req,
    .core_pwr_en, .mem_pwr_en, .iso_en, .core_rst_n, .mode
  );

  imem_ctrl #(.WORDS(IMEM_WORDS), .MAX_RETRIES(IMEM_RETRIES)) u_imem (
    .clk, .rst_n, .pwr_en(mem_pwr_en),
    .fetch_req(ifetch_req && ifetch_addr >= IRRAM_BASE),
    .fetch_addr(IAW'((ifetch_addr - IRRAM_BASE) >> 1)),
    .fetch_data(ifetch_data), .fetch_valid(ifetch_valid),
    .prog_req, .prog_addr, .prog_wdata, .prog_busy, .prog_done, .prog_ok,
    .inj_we(inj_we && inj_sel == INJ_IMEM), .inj_addr(inj_addr[IAW-1:0]), .inj_cnt
  );

  mem_interconnect u_xbar (
    .clk, .rst_n,
    .core_i(core_req_i), .core_o(core_rsp_o),
    .periph_o(periph_req_o), .periph_i(periph_rsp_i),
    .sram_o(sram_req), .sram_i(sram_rsp),
    .drram_o(drram_req), .drram_i(drram_rsp)
  );

  scratchpad_sram #(.WORDS(SRAM_WORDS)) u_sram (
    .clk, .rst_n, .bus_i(sram_req), .bus_o(sram_rsp)
  );

  assign run_endurer = (mode == PM_ACTIVE) && !shutdown_req;

  endurer #(.DEPTH(DMEM_WORDS), .BUF_WORDS(ENDURER_BUF),
            .PERIOD_CYCLES(ENDURER_PERIOD)) u_endurer (
    .clk, .rst_n, .run(run_endurer),
    .core_i(drram_req), .core_o(drram_rsp),
    .mem_o(dmem_req), .mem_i(dmem_rsp),
    .busy(endurer_busy), .key(endurer_key), .remap_evt(endurer_evt)
  );

  data_rram_ctrl #(.DATA_WORDS(DMEM_WORDS), .BACKUP_WORDS(BACKUP_WORDS),
                   .LUT_ENTRIES(LUT_ENTRIES), .MAX_RETRIES(DMEM_RETRIES)) u_dmem (
    .clk, .rst_n, .pwr_en(mem_pwr_en),
    .bus_i(dmem_req), .bus_o(dmem_rsp),
    .save_req, .save_done, .restore_req, .restore_busy,
    .inj_we(inj_we && (inj_sel == INJ_DMAIN || inj_sel == INJ_BACKUP)),
    .inj_backup(inj_sel == INJ_BACKUP), .inj_addr(inj_addr[DAW-1:0]), .inj_cnt,
    .remap_evt, .nvlut_inval_evt, .lost_evt, .lut_used
  );

  mlc_weight_codec #(.LEVELS(5)) u_mlc (
    .enc_weight(mlc_enc_weight), .enc_sign(mlc_enc_sign),
    .enc_hi(mlc_enc_hi), .enc_lo(mlc_enc_lo),
    .dec_sign(mlc_dec_sign), .dec_hi(mlc_dec_hi), .dec_lo(mlc_dec_lo),
    .dec_weight(mlc_dec_weight)
  );

endmodule
