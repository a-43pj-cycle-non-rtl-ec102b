// data_rram_ctrl: controller of the 4 KB data RRAM with dynamic address
// remapping.
//
// What it does (following the published scheme):
//  * Every write is written and verified, with up to MAX_RETRIES (4) retries.
//  * A word that still fails is remapped at run time: the next free slot of
//    the 256-word backup RRAM array takes the data, and the volatile remap
//    table (remap_lut, 128 entries of flip-flops) records the address. Later
//    reads and writes of that address go to the slot.
//  * Before shutdown (save_req) the volatile table is copied to the other
//    128 words of the backup array, the non-volatile table. Each word there is
//    {five copies of the valid bit, word address}. If that word cannot be
//    written, it is overwritten with an invalid entry: on restore a majority
//    vote over the five valid copies decides whether an entry is valid.
//  * After wake-up (restore_req) the volatile table is reloaded from the
//    non-volatile table.
//
// Choices of this design: only entries changed since the last save are
// written, so a shutdown costs about 5 cycles per changed entry (no change:
// two cycles); a failing backup slot is invalidated and the next slot is
// tried; when the table is full the write ends with err (data lost); the
// restore reads one entry per cycle (ENTRIES+1 cycles) while data-RRAM
// accesses wait; reads take one cycle.
//
// Interface: bus_i/bus_o (word index in addr; the requester holds req until
// ready). A read answers one cycle after the request, a write after 5 cycles
// plus 4 per retry (more when it is remapped). save_req/save_done and
// restore_req/restore_busy talk to the power scheduler. pwr_en low models
// the power-gated state: the table is emptied and accesses wait. The inj_*
// ports reach the fault-injection hooks of the two RRAM models; the *_evt
// outputs pulse for each remap, non-volatile table invalidation and lost
// write.
module data_rram_ctrl
  import nvmcu_pkg::*;
#(
  parameter int unsigned DATA_WORDS   = 2048,
  parameter int unsigned BACKUP_WORDS = 256,
  parameter int unsigned LUT_ENTRIES  = 128,
  parameter int unsigned MAX_RETRIES  = 4,
  localparam int unsigned AW = $clog2(DATA_WORDS),
  localparam int unsigned BW = $clog2(BACKUP_WORDS),
  localparam int unsigned IW = $clog2(LUT_ENTRIES)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          pwr_en,
  input  bus_req_t      bus_i,
  output bus_rsp_t      bus_o,
  input  logic          save_req,
  output logic          save_done,
  input  logic          restore_req,
  output logic          restore_busy,
  input  logic          inj_we,
  input  logic          inj_backup,
  input  logic [AW-1:0] inj_addr,
  input  logic [3:0]    inj_cnt,
  output logic          remap_evt,
  output logic          nvlut_inval_evt,
  output logic          lost_evt,
  output logic [IW:0]   lut_used
);

  localparam int unsigned NV_BASE = LUT_ENTRIES;  // non-volatile table in the upper half

  typedef enum logic [3:0] {
    S_IDLE, S_RD, S_WR, S_WR_NEXT, S_SAVE_SCAN, S_SAVE_WR, S_SAVE_INV0,
    S_SAVE_INV, S_RESTORE
  } state_e;

  state_e          state;
  logic [AW-1:0]   cur_addr_q;
  logic [15:0]     cur_data_q;
  logic [IW-1:0]   cur_idx_q;
  logic            tgt_bk_q;     // write-verify targets the backup array
  logic            remapped_q;   // current write was moved to a new slot
  logic            rd_bk_q;
  logic            restore_pend_q;
  logic [IW:0]     rs_cnt_q;

  // remap table
  logic          lk_hit, full, fd_any, fd_valid;
  logic [IW-1:0] lk_idx, alloc_idx, fd_idx;
  logic [AW-1:0] fd_addr;
  logic          alloc, inv, ld, clr_dirty;
  logic [IW-1:0] inv_idx, ld_idx;
  logic          ld_valid;
  logic [AW-1:0] ld_addr;

  // write-verify
  logic          wv_start, wv_busy, wv_done, wv_ok;
  logic [AW-1:0] wv_addr;
  logic [15:0]   wv_wdata;
  logic [3:0]    wv_attempts;
  logic          wv_mem_we, wv_mem_re;
  logic [AW-1:0] wv_mem_addr;
  logic [15:0]   wv_mem_wdata, wv_mem_rdata;

  // arrays
  logic          m_re, m_we, b_re, b_we;
  logic [AW-1:0] m_addr;
  logic [BW-1:0] b_addr;
  logic [15:0]   m_wdata, b_wdata, m_rdata, b_rdata;
  logic          d_m_re, d_b_re;
  logic [AW-1:0] d_m_addr;
  logic [BW-1:0] d_b_addr;

  remap_lut #(.ENTRIES(LUT_ENTRIES), .AW(AW)) u_lut (
    .clk, .rst_n, .clear(!pwr_en),
    .lk_addr(bus_i.addr[AW-1:0]), .lk_hit, .lk_idx,
    .alloc, .alloc_addr(cur_addr_q), .full, .alloc_idx,
    .inv, .inv_idx,
    .ld, .ld_idx, .ld_valid, .ld_addr,
    .fd_any, .fd_idx, .fd_valid, .fd_addr,
    .clr_dirty, .clr_idx(cur_idx_q), .used(lut_used)
  );

  rram_write_verify #(.AW(AW), .WIDTH(16), .MAX_RETRIES(MAX_RETRIES)) u_wv (
    .clk, .rst_n, .start(wv_start), .addr(wv_addr), .wdata(wv_wdata),
    .busy(wv_busy), .done(wv_done), .ok(wv_ok), .attempts(wv_attempts),
    .mem_we(wv_mem_we), .mem_re(wv_mem_re), .mem_addr(wv_mem_addr),
    .mem_wdata(wv_mem_wdata), .mem_rdata(wv_mem_rdata)
  );

  rram_macro #(.DEPTH(DATA_WORDS)) u_main (
    .clk, .pwr_en, .re(m_re), .we(m_we), .addr(m_addr), .wdata(m_wdata),
    .rdata(m_rdata), .inj_we(inj_we && !inj_backup), .inj_addr(inj_addr), .inj_cnt
  );

  rram_macro #(.DEPTH(BACKUP_WORDS)) u_backup (
    .clk, .pwr_en, .re(b_re), .we(b_we), .addr(b_addr), .wdata(b_wdata),
    .rdata(b_rdata), .inj_we(inj_we && inj_backup), .inj_addr(inj_addr[BW-1:0]), .inj_cnt
  );

  // Array ports: the write-verify sequencer owns the array it targets while
  // busy; otherwise the read and restore paths use them.
  always_comb begin
    m_re    = d_m_re;   m_we = 1'b0; m_addr = d_m_addr; m_wdata = '0;
    b_re    = d_b_re;   b_we = 1'b0; b_addr = d_b_addr; b_wdata = '0;
    if (wv_busy && !tgt_bk_q) begin
      m_re = wv_mem_re; m_we = wv_mem_we; m_addr = wv_mem_addr; m_wdata = wv_mem_wdata;
    end
    if (wv_busy && tgt_bk_q) begin
      b_re = wv_mem_re; b_we = wv_mem_we; b_addr = wv_mem_addr[BW-1:0]; b_wdata = wv_mem_wdata;
    end
    wv_mem_rdata = tgt_bk_q ? b_rdata : m_rdata;
  end

  function automatic logic [15:0] nv_word(input logic v, input logic [AW-1:0] a);
    logic [15:0] w;
    w = '0;
    w[AW-1:0] = a;
    w[15 -: NV_VALID_BITS] = {NV_VALID_BITS{v}};
    return w;
  endfunction

  always_comb begin
    bus_o           = '0;
    save_done       = 1'b0;
    remap_evt       = 1'b0;
    nvlut_inval_evt = 1'b0;
    lost_evt        = 1'b0;
    alloc = 1'b0; inv = 1'b0; inv_idx = cur_idx_q;
    ld = 1'b0; ld_idx = rs_cnt_q[IW-1:0] - 1'b1; ld_valid = 1'b0; ld_addr = '0;
    clr_dirty = 1'b0;
    wv_start = 1'b0; wv_addr = '0; wv_wdata = '0;
    d_m_re = 1'b0; d_m_addr = bus_i.addr[AW-1:0];
    d_b_re = 1'b0; d_b_addr = BW'(lk_idx);
    unique case (state)
      S_IDLE: begin
        if (pwr_en && !restore_pend_q && !save_req && bus_i.req) begin
          if (!bus_i.we) begin
            d_m_re = !lk_hit;
            d_b_re = lk_hit;
          end else begin
            wv_start = 1'b1;
            wv_addr  = lk_hit ? AW'(lk_idx) : bus_i.addr[AW-1:0];
            wv_wdata = bus_i.wdata;
          end
        end
      end
      S_RD: begin
        bus_o.ready = 1'b1;
        bus_o.rdata = rd_bk_q ? b_rdata : m_rdata;
      end
      S_WR: if (wv_done) begin
        if (wv_ok) begin
          bus_o.ready = 1'b1;
          remap_evt   = remapped_q;
        end else begin
          inv = tgt_bk_q;
          if (full) begin
            bus_o.ready = 1'b1;
            bus_o.err   = 1'b1;
            lost_evt    = 1'b1;
          end else begin
            alloc = 1'b1;
          end
        end
      end
      S_WR_NEXT: begin
        wv_start = 1'b1;
        wv_addr  = AW'(cur_idx_q);
        wv_wdata = cur_data_q;
      end
      S_SAVE_SCAN: begin
        if (fd_any) begin
          wv_start = 1'b1;
          wv_addr  = AW'(NV_BASE) + AW'(fd_idx);
          wv_wdata = nv_word(fd_valid, fd_addr);
        end else begin
          save_done = 1'b1;
        end
      end
      S_SAVE_WR: if (wv_done) begin
        clr_dirty       = wv_ok;
        nvlut_inval_evt = !wv_ok;
      end
      S_SAVE_INV0: begin
        wv_start = 1'b1;
        wv_addr  = AW'(NV_BASE) + AW'(cur_idx_q);
        wv_wdata = nv_word(1'b0, '0);
      end
      S_SAVE_INV: clr_dirty = wv_done;
      S_RESTORE: begin
        d_b_re   = (rs_cnt_q < (IW+1)'(LUT_ENTRIES));
        d_b_addr = BW'(NV_BASE) + BW'(rs_cnt_q);
        if (rs_cnt_q != '0) begin
          ld       = 1'b1;
          ld_valid = majority5(b_rdata[15 -: NV_VALID_BITS]);
          ld_addr  = b_rdata[AW-1:0];
        end
      end
      default: ;
    endcase
  end

  assign restore_busy = restore_pend_q || (state == S_RESTORE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= S_IDLE;
      cur_addr_q     <= '0;
      cur_data_q     <= '0;
      cur_idx_q      <= '0;
      tgt_bk_q       <= 1'b0;
      remapped_q     <= 1'b0;
      rd_bk_q        <= 1'b0;
      restore_pend_q <= 1'b0;
      rs_cnt_q       <= '0;
    end else if (!pwr_en) begin
      state          <= S_IDLE;
      restore_pend_q <= restore_req;
    end else begin
      if (restore_req) restore_pend_q <= 1'b1;
      unique case (state)
        S_IDLE: begin
          if (restore_pend_q) begin
            restore_pend_q <= 1'b0;
            rs_cnt_q       <= '0;
            state          <= S_RESTORE;
          end else if (save_req) begin
            tgt_bk_q <= 1'b1;
            state    <= S_SAVE_SCAN;
          end else if (bus_i.req) begin
            cur_addr_q <= bus_i.addr[AW-1:0];
            cur_data_q <= bus_i.wdata;
            cur_idx_q  <= lk_idx;
            tgt_bk_q   <= lk_hit;
            rd_bk_q    <= lk_hit;
            remapped_q <= 1'b0;
            state      <= bus_i.we ? S_WR : S_RD;
          end
        end
        S_RD: state <= S_IDLE;
        S_WR: if (wv_done) begin
          if (wv_ok || full) state <= S_IDLE;
          else begin
            cur_idx_q  <= alloc_idx;
            tgt_bk_q   <= 1'b1;
            remapped_q <= 1'b1;
            state      <= S_WR_NEXT;
          end
        end
        S_WR_NEXT: state <= S_WR;
        S_SAVE_SCAN: begin
          if (fd_any) begin
            cur_idx_q <= fd_idx;
            state     <= S_SAVE_WR;
          end else begin
            tgt_bk_q <= 1'b0;
            state    <= S_IDLE;
          end
        end
        S_SAVE_WR: if (wv_done) state <= wv_ok ? S_SAVE_SCAN : S_SAVE_INV0;
        S_SAVE_INV0: state <= S_SAVE_INV;
        S_SAVE_INV:  if (wv_done) state <= S_SAVE_SCAN;
        S_RESTORE: begin
          rs_cnt_q <= rs_cnt_q + 1'b1;
          if (rs_cnt_q == (IW+1)'(LUT_ENTRIES)) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A requester keeps its request up until it is answered.
  a_req_held: assert property (@(posedge clk) disable iff (!rst_n || !pwr_en)
    bus_i.req && !bus_o.ready |=> bus_i.req);

  initial begin
    assert (BACKUP_WORDS >= 2 * LUT_ENTRIES) else $error("backup array too small");
    assert (AW + NV_VALID_BITS <= 16) else $error("address too wide for a table word");
  end

endmodule
