// rram_write_verify: write-verify sequencer for one RRAM array.
//
// A write to RRAM can fail (the cell lands outside its resistance window),
// so every word write is followed by a read-back. If the word read back
// differs from the data written, the write is retried, up to MAX_RETRIES
// times after the first attempt (4 for the data RRAM, as published). The
// result (ok or failed) is reported with done; the caller then decides
// whether to remap the address.
//
// Timing: start is taken in cycle 0; one attempt is WRITE (programming
// pulse), SETTLE, READ (verify read issued), CHECK (read data compared), so a
// write that succeeds at once has done in cycle 4: 5 clock cycles per 16-bit
// word, the published write time. Every retry adds 4 cycles. The split of the
// 5 cycles into these steps is this design's own choice.
//
// Interface: start/addr/wdata in; busy, done (one-cycle pulse), ok and
// attempts out; mem_* drive the array port.
module rram_write_verify #(
  parameter int unsigned AW          = 11,
  parameter int unsigned WIDTH       = 16,
  parameter int unsigned MAX_RETRIES = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic             busy,
  output logic             done,
  output logic             ok,
  output logic [3:0]       attempts,
  output logic             mem_we,
  output logic             mem_re,
  output logic [AW-1:0]    mem_addr,
  output logic [WIDTH-1:0] mem_wdata,
  input  logic [WIDTH-1:0] mem_rdata
);

  typedef enum logic [2:0] {S_IDLE, S_WRITE, S_SETTLE, S_READ, S_CHECK} state_e;
  state_e           state;
  logic [AW-1:0]    a_q;
  logic [WIDTH-1:0] d_q;
  logic [3:0]       tries;   // attempts made so far, including the current one

  wire match = (mem_rdata == d_q);
  wire last  = (tries >= 4'(MAX_RETRIES + 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      a_q   <= '0;
      d_q   <= '0;
      tries <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          a_q   <= addr;
          d_q   <= wdata;
          tries <= 4'd1;
          state <= S_WRITE;
        end
        S_WRITE:  state <= S_SETTLE;
        S_SETTLE: state <= S_READ;
        S_READ:   state <= S_CHECK;
        S_CHECK: begin
          if (match || last) state <= S_IDLE;
          else begin
            tries <= tries + 4'd1;
            state <= S_WRITE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    busy      = (state != S_IDLE);
    done      = (state == S_CHECK) && (match || last);
    ok        = (state == S_CHECK) && match;
    attempts  = tries;
    mem_we    = (state == S_WRITE);
    mem_re    = (state == S_READ);
    mem_addr  = a_q;
    mem_wdata = d_q;
  end

endmodule
