// imem_ctrl: the 12 KB (6144 x 16 b) instruction RRAM and its two ports.
//
// The core fetches instructions through the fetch port: fetch_req with a
// word index returns fetch_data with fetch_valid one cycle later (one RRAM
// read per 100 ns cycle). The program port writes the program image before
// the core runs; each word is written with write-verify. Because the
// instruction RRAM is written only while it is programmed, it uses stronger
// programming than the data RRAM (more retries, MAX_RETRIES = 8 here; the
// published design says "more retries" without a number) and no run-time
// remapping. The program port has priority over the fetch port; fetches
// issued while a word is being programmed are not answered.
//
// Timing: a program write that succeeds at once takes 5 cycles from prog_req
// to prog_done, plus 4 per retry. pwr_en low models the power-gated array:
// contents stay, accesses are ignored. The inj_* ports reach the
// fault-injection hook of the RRAM model.
module imem_ctrl #(
  parameter int unsigned WORDS       = 6144,
  parameter int unsigned MAX_RETRIES = 8,
  localparam int unsigned AW = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          pwr_en,
  input  logic          fetch_req,
  input  logic [AW-1:0] fetch_addr,
  output logic [15:0]   fetch_data,
  output logic          fetch_valid,
  input  logic          prog_req,
  input  logic [AW-1:0] prog_addr,
  input  logic [15:0]   prog_wdata,
  output logic          prog_busy,
  output logic          prog_done,
  output logic          prog_ok,
  input  logic          inj_we,
  input  logic [AW-1:0] inj_addr,
  input  logic [3:0]    inj_cnt
);

  logic          wv_busy, wv_mem_we, wv_mem_re;
  logic [AW-1:0] wv_mem_addr;
  logic [15:0]   wv_mem_wdata, rdata;
  logic [3:0]    wv_attempts;
  logic          fetch_q;
  wire           wv_start = pwr_en && prog_req && !wv_busy;
  wire           do_fetch = pwr_en && fetch_req && !wv_busy && !prog_req;

  rram_write_verify #(.AW(AW), .WIDTH(16), .MAX_RETRIES(MAX_RETRIES)) u_wv (
    .clk, .rst_n, .start(wv_start), .addr(prog_addr), .wdata(prog_wdata),
    .busy(wv_busy), .done(prog_done), .ok(prog_ok), .attempts(wv_attempts),
    .mem_we(wv_mem_we), .mem_re(wv_mem_re), .mem_addr(wv_mem_addr),
    .mem_wdata(wv_mem_wdata), .mem_rdata(rdata)
  );

  rram_macro #(.DEPTH(WORDS)) u_array (
    .clk, .pwr_en,
    .re(wv_busy ? wv_mem_re : do_fetch),
    .we(wv_busy && wv_mem_we),
    .addr(wv_busy ? wv_mem_addr : fetch_addr),
    .wdata(wv_mem_wdata),
    .rdata(rdata),
    .inj_we, .inj_addr, .inj_cnt
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) fetch_q <= 1'b0;
    else        fetch_q <= do_fetch;
  end

  assign fetch_valid = fetch_q;
  assign fetch_data  = rdata;
  assign prog_busy   = wv_busy || prog_req;

endmodule
