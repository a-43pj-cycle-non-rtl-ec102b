// tb_failure_rates: the data-RRAM resilience workload at full size. Every
// word of the 2048-word data RRAM is written with write failures injected at
// the rates the design is specified to tolerate: temporary failures (1 to 4
// failing attempts) in 17.3% of words and permanent failures in 2% of words.
// All words must read back correctly, before and after a shutdown and
// wake-up; each permanently failed word must take one backup slot and each
// temporarily failed word none. All parameters are at their defaults.
module tb_failure_rates;
  import nvmcu_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ifetch_valid, prog_busy, prog_done, prog_ok;
  logic [15:0] ifetch_data;
  bus_req_t core_req_i, periph_req_o;
  bus_rsp_t core_rsp_o, periph_rsp_i;
  logic shutdown_req = 0, wake_evt = 0, core_pwr_en, core_rst_n, mem_pwr_en, iso_en;
  pmode_e mode;
  logic restore_busy, endurer_busy, endurer_evt, remap_evt, nvlut_inval_evt, lost_evt;
  logic [10:0] endurer_key;
  logic [7:0] lut_used;
  logic signed [5:0] mlc_dec_weight;
  logic mlc_enc_sign;
  logic [2:0] mlc_enc_hi, mlc_enc_lo;
  logic inj_we = 0;
  inj_sel_e inj_sel = INJ_DMAIN;
  logic [15:0] inj_addr = 0;
  logic [3:0] inj_cnt = 0;

  nvmcu_top dut (
    .clk, .rst_n, .ifetch_req(1'b0), .ifetch_addr(16'h0), .ifetch_data, .ifetch_valid,
    .core_req_i, .core_rsp_o, .periph_req_o, .periph_rsp_i,
    .prog_req(1'b0), .prog_addr(13'h0), .prog_wdata(16'h0), .prog_busy, .prog_done, .prog_ok,
    .shutdown_req, .wake_evt, .core_pwr_en, .core_rst_n, .mem_pwr_en, .iso_en, .mode,
    .restore_busy, .endurer_busy, .endurer_key, .endurer_evt, .remap_evt, .nvlut_inval_evt,
    .lost_evt, .lut_used,
    .mlc_enc_weight(6'sd0), .mlc_enc_sign, .mlc_enc_hi, .mlc_enc_lo,
    .mlc_dec_sign(1'b0), .mlc_dec_hi(3'd0), .mlc_dec_lo(3'd0), .mlc_dec_weight,
    .inj_we, .inj_sel, .inj_addr, .inj_cnt
  );
  always #50 clk = ~clk;
  assign periph_rsp_i = '{ready: periph_req_o.req, err: 1'b0, rdata: 16'h0};

  int checks = 0, failures = 0, n_twf = 0, n_pwf = 0, n_remap = 0, n_lost = 0, n_retry = 0;
  logic [15:0] model [2048];
  always @(posedge clk) begin
    if (remap_evt) n_remap++;
    if (lost_evt) n_lost++;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic bus(input logic we, input int l, input logic [15:0] d,
                     output logic [15:0] q, output logic err, output int lat);
    @(negedge clk); core_req_i = '{req: 1'b1, we: we, addr: DRRAM_BASE + 16'(2 * l), wdata: d};
    #1; lat = 1;
    while (!core_rsp_o.ready && lat < 1000) begin @(negedge clk); lat++; end
    q = core_rsp_o.rdata; err = core_rsp_o.err;
    @(posedge clk); #1; core_req_i.req = 0;
  endtask

  task automatic read_all(input string what);
    logic [15:0] q; logic e; int lat;
    for (int l = 0; l < 2048; l++) begin
      bus(0, l, 0, q, e, lat);
      chk(q == model[l] && !e, $sformatf("%s: word %0d got %h exp %h", what, l, q, model[l]));
    end
  endtask

  initial begin
    #2000000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [15:0] q; logic e; int lat, cyc;
    core_req_i = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    while (mode != PM_ACTIVE || restore_busy) @(negedge clk);
    // inject: 2% permanent (r < 20 of 1000), 17.3% temporary (20 <= r < 193)
    for (int l = 0; l < 2048; l++) begin
      int r;
      r = $urandom_range(0, 999);
      if (r < 20 || r < 193) begin
        @(negedge clk); inj_we = 1; inj_sel = INJ_DMAIN; inj_addr = 16'(l);
        if (r < 20) begin inj_cnt = 4'hF; n_pwf++; end
        else begin inj_cnt = 4'($urandom_range(1, 4)); n_twf++; end
        @(negedge clk); inj_we = 0;
      end
    end
    $display("injected: %0d temporary, %0d permanent of 2048 words", n_twf, n_pwf);
    for (int l = 0; l < 2048; l++) begin
      model[l] = 16'($urandom);
      bus(1, l, model[l], q, e, lat);
      chk(!e, $sformatf("write %0d not lost", l));
      if (lat > 5) n_retry++;
    end
    chk(n_remap == n_pwf && int'(lut_used) == n_pwf && n_lost == 0,
        $sformatf("one backup slot per permanent failure: remaps %0d slots %0d", n_remap, lut_used));
    chk(n_retry == n_twf + n_pwf, $sformatf("retried writes %0d", n_retry));
    read_all("before shutdown");
    @(negedge clk); shutdown_req = 1; cyc = 0;
    while (mode != PM_OFF) begin @(negedge clk); cyc++; end
    shutdown_req = 0;
    $display("saving %0d table entries took %0d cycles", n_pwf, cyc);
    repeat (10) @(negedge clk);
    @(negedge clk); wake_evt = 1; @(negedge clk); wake_evt = 0;
    while (mode != PM_ACTIVE || restore_busy) @(negedge clk);
    chk(int'(lut_used) == n_pwf, "table restored");
    read_all("after wake-up");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
