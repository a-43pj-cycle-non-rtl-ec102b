// endurer: periodic random address remapping of the data RRAM (ENDURER,
// ENDUrance REsiliency using random Remapping), which spreads repeated
// writes to a few hot addresses over the whole array so no word wears out
// early.
//
// How it works: logical word address l is stored at physical address
// l ^ key. Every PERIOD_CYCLES cycles (30 minutes at 10 MHz, as published)
// a new key is chosen, key' = key ^ D with D a nonzero value from a 16-bit
// LFSR, and the data is moved to match. Under an XOR change the words form
// pairs (p, p ^ D) that simply swap places, so the move reads up to four
// pairs (BUF_WORDS = 8 words, the published SRAM buffer size) into the
// buffer and writes each word back to its partner's address, batch after
// batch, until all DEPTH/2 pairs are swapped. The XOR mapping, the LFSR and
// the pair-wise move are this design's choices: the published text gives
// only the period, the buffer size and that the remapping is random.
//
// Interface: core_i/core_o is the data-RRAM side of the data bus (logical
// word index); mem_o/mem_i go to the data-RRAM controller (physical word
// index). Both use the hold-until-ready protocol; in normal operation
// requests pass straight through with only the address translated. A move
// starts only when run is high, either with no core access open or in the
// cycle the open one completes, so back-to-back accesses cannot starve it;
// while it runs (busy) core accesses wait. remap_evt pulses when a move
// completes. A move of a 2048-word array costs 2048 reads and 2048 verified
// writes.
module endurer
  import nvmcu_pkg::*;
#(
  parameter int unsigned     DEPTH         = 2048,
  parameter int unsigned     BUF_WORDS     = 8,
  parameter longint unsigned PERIOD_CYCLES = 64'd18_000_000_000,
  parameter logic [15:0]     LFSR_SEED     = 16'hACE1,
  localparam int unsigned    AW            = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          run,
  input  bus_req_t      core_i,
  output bus_rsp_t      core_o,
  output bus_req_t      mem_o,
  input  bus_rsp_t      mem_i,
  output logic          busy,
  output logic [AW-1:0] key,
  output logic          remap_evt
);

  localparam int unsigned PAIRS   = DEPTH / 2;
  localparam int unsigned PER_BAT = BUF_WORDS / 2;
  localparam int unsigned BI      = $clog2(BUF_WORDS);

  typedef enum logic [1:0] {S_PASS, S_RD, S_WR} state_e;
  state_e        state;
  logic [63:0]   timer_q;
  logic [15:0]   lfsr_q;
  logic [AW-1:0] key_q, d_q;
  logic [$clog2(AW)-1:0] h_q;        // highest set bit of d_q
  logic [AW-1:0] batch_q;            // first pair of the batch
  logic [BI-1:0] i_q;                // buffer word being moved
  logic [15:0]   buf_q [BUF_WORDS];

  function automatic logic [15:0] lfsr_next(input logic [15:0] s);
    return {1'b0, s[15:1]} ^ (s[0] ? 16'hB400 : 16'h0000);
  endfunction

  function automatic logic [$clog2(AW)-1:0] msb(input logic [AW-1:0] v);
    msb = '0;
    for (int b = 0; b < int'(AW); b++) if (v[b]) msb = ($clog2(AW))'(b);
  endfunction

  // Physical address of buffer word i: the lower member of pair j has a 0
  // inserted at bit h of j; the odd buffer word is its partner.
  function automatic logic [AW-1:0] pair_addr(input logic [AW-1:0] j,
                                              input logic [$clog2(AW)-1:0] h,
                                              input logic odd,
                                              input logic [AW-1:0] d);
    logic [AW-1:0] lo_mask, p;
    lo_mask = (AW'(1) << h) - AW'(1);
    p = ((j & ~lo_mask) << 1) | (j & lo_mask);
    return odd ? (p ^ d) : p;
  endfunction

  wire [AW-1:0] cur_pair = batch_q + AW'(i_q >> 1);
  wire [AW-1:0] cur_addr = pair_addr(cur_pair, h_q, i_q[0], d_q);
  wire          due      = (timer_q >= PERIOD_CYCLES - 64'd1);
  wire [AW-1:0] d_new    = (lfsr_q[AW-1:0] == '0) ? AW'(1) : lfsr_q[AW-1:0];

  always_comb begin
    mem_o     = '0;
    core_o    = '0;
    remap_evt = 1'b0;
    unique case (state)
      S_PASS: begin
        mem_o      = core_i;
        mem_o.addr = {core_i.addr[15:AW], core_i.addr[AW-1:0] ^ key_q};
        core_o     = mem_i;
      end
      S_RD: begin
        mem_o.req  = 1'b1;
        mem_o.addr = 16'(cur_addr);
      end
      S_WR: begin
        mem_o.req   = 1'b1;
        mem_o.we    = 1'b1;
        mem_o.addr  = 16'(cur_addr);
        mem_o.wdata = buf_q[i_q ^ BI'(1)];
        remap_evt   = mem_i.ready && (i_q == BI'(BUF_WORDS - 1)) &&
                      (batch_q == AW'(PAIRS - PER_BAT));
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_PASS;
      timer_q <= '0;
      lfsr_q  <= LFSR_SEED;
      key_q   <= '0;
      d_q     <= '0;
      h_q     <= '0;
      batch_q <= '0;
      i_q     <= '0;
      for (int k = 0; k < int'(BUF_WORDS); k++) buf_q[k] <= '0;
    end else begin
      unique case (state)
        S_PASS: begin
          if (!due) timer_q <= timer_q + 64'd1;
          if (due && run && (!core_i.req || mem_i.ready)) begin
            d_q     <= d_new;
            h_q     <= msb(d_new);
            lfsr_q  <= lfsr_next(lfsr_q);
            batch_q <= '0;
            i_q     <= '0;
            state   <= S_RD;
          end
        end
        S_RD: if (mem_i.ready) begin
          buf_q[i_q] <= mem_i.rdata;
          i_q        <= i_q + 1'b1;
          if (i_q == BI'(BUF_WORDS - 1)) state <= S_WR;
        end
        S_WR: if (mem_i.ready) begin
          i_q <= i_q + 1'b1;
          if (i_q == BI'(BUF_WORDS - 1)) begin
            if (batch_q == AW'(PAIRS - PER_BAT)) begin
              key_q   <= key_q ^ d_q;
              timer_q <= '0;
              state   <= S_PASS;
            end else begin
              batch_q <= batch_q + AW'(PER_BAT);
              state   <= S_RD;
            end
          end
        end
        default: state <= S_PASS;
      endcase
    end
  end

  assign busy = (state != S_PASS);
  assign key  = key_q;

  initial assert (BUF_WORDS >= 2 && (BUF_WORDS & (BUF_WORDS - 1)) == 0 &&
                  PAIRS % PER_BAT == 0) else $error("bad ENDURER buffer size");

endmodule
