// tb_nvmcu_top: end-to-end test of the memory and power subsystem. The
// testbench plays the core and a sensor. It programs and fetches the
// instruction RRAM, runs a sense-process-store loop over the peripheral
// port, scratchpad SRAM and data RRAM while injecting RRAM write failures,
// shuts down and wakes up several times, and checks that every result
// survives. ENDURER's period is shortened to 20000 cycles (2 ms at 10 MHz)
// so that it moves the data during the run; all other parameters are the
// defaults. Each mechanism is counted and must occur at least once:
// instruction programming retry, fetch, SRAM and peripheral accesses, data
// write retries, remapping, skipped backup slot, table save, table word
// invalidation, shutdown, 2-cycle wake-up, table restore, ENDURER move,
// unmapped access, lost write when the table is full, MLC weight coding.
module tb_nvmcu_top;
  import nvmcu_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ifetch_req = 0, ifetch_valid;
  logic [15:0] ifetch_addr = 0, ifetch_data;
  bus_req_t core_req_i, periph_req_o;
  bus_rsp_t core_rsp_o, periph_rsp_i;
  logic prog_req = 0, prog_busy, prog_done, prog_ok;
  logic [12:0] prog_addr = 0;
  logic [15:0] prog_wdata = 0;
  logic shutdown_req = 0, wake_evt = 0, core_pwr_en, core_rst_n, mem_pwr_en, iso_en;
  pmode_e mode;
  logic restore_busy, endurer_busy, endurer_evt, remap_evt, nvlut_inval_evt, lost_evt;
  logic [10:0] endurer_key;
  logic [7:0] lut_used;
  logic signed [5:0] mlc_enc_weight = 0, mlc_dec_weight;
  logic mlc_enc_sign, mlc_dec_sign = 0;
  logic [2:0] mlc_enc_hi, mlc_enc_lo, mlc_dec_hi = 0, mlc_dec_lo = 0;
  logic inj_we = 0;
  inj_sel_e inj_sel = INJ_IMEM;
  logic [15:0] inj_addr = 0;
  logic [3:0] inj_cnt = 0;

  nvmcu_top #(.ENDURER_PERIOD(64'd20000)) dut (.*);
  always #50 clk = ~clk;   // 10 MHz

  int checks = 0, failures = 0;
  // mechanism counters
  int n_prog_retry = 0, n_fetch = 0, n_sram = 0, n_periph = 0, n_dretry = 0;
  int n_remap = 0, n_slot_skip = 0, n_save = 0, n_inval = 0, n_shutdown = 0;
  int n_wake = 0, n_restore = 0, n_move = 0, n_unmapped = 0, n_lost = 0, n_mlc = 0;
  logic [15:0] model [2048];
  logic [15:0] sensor_q = 16'h0100;

  always @(posedge clk) begin
    if (remap_evt) n_remap++;
    if (nvlut_inval_evt) n_inval++;
    if (lost_evt) n_lost++;
    if (endurer_evt) n_move++;
  end

  // sensor on the peripheral port: each read returns the next sample
  always_comb begin
    periph_rsp_i.ready = periph_req_o.req;
    periph_rsp_i.err   = 1'b0;
    periph_rsp_i.rdata = sensor_q + periph_req_o.addr;
  end
  always @(posedge clk) if (periph_req_o.req && !periph_req_o.we) sensor_q <= sensor_q + 16'd3;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic inject(input inj_sel_e s, input int a, input int n);
    @(negedge clk); inj_we = 1; inj_sel = s; inj_addr = 16'(a); inj_cnt = 4'(n);
    @(negedge clk); inj_we = 0;
  endtask

  task automatic bus(input logic we, input logic [15:0] a, input logic [15:0] d,
                     output logic [15:0] q, output logic err, output int lat);
    @(negedge clk); core_req_i = '{req: 1'b1, we: we, addr: a, wdata: d}; lat = 1;
    #1;
    while (!core_rsp_o.ready && lat < 100000) begin @(negedge clk); lat++; end
    q = core_rsp_o.rdata; err = core_rsp_o.err;
    @(posedge clk); #1; core_req_i.req = 0;
  endtask

  task automatic dwrite(input int l, input logic [15:0] d, output int lat);
    logic [15:0] q; logic e;
    bus(1, DRRAM_BASE + 16'(2 * l), d, q, e, lat);
    model[l] = d;
  endtask

  task automatic dread_chk(input int l, input string what);
    logic [15:0] q; logic e; int lat;
    bus(0, DRRAM_BASE + 16'(2 * l), 0, q, e, lat);
    chk(q == model[l] && !e, $sformatf("%s: data word %0d got %h exp %h", what, l, q, model[l]));
  endtask

  task automatic shutdown_wake();
    int cyc;
    while (endurer_busy) @(negedge clk);
    @(negedge clk); shutdown_req = 1; cyc = 0;
    while (mode != PM_OFF && cyc < 10000) begin @(negedge clk); cyc++; end
    shutdown_req = 0;
    chk(mode == PM_OFF && !mem_pwr_en && !core_pwr_en && !core_rst_n, "shut down");
    n_shutdown++; n_save++;
    $display("shutdown took %0d cycles (%0d ns)", cyc, cyc * 100);
    repeat (20) @(negedge clk);
    chk(mode == PM_OFF, "stays off until data arrives");
    @(negedge clk); wake_evt = 1;
    @(posedge clk); #1; wake_evt = 0; cyc = 0;
    while (!core_rst_n && cyc < 20) begin @(posedge clk); #1; cyc++; end
    chk(cyc == 2, $sformatf("wake-up took %0d cycles", cyc));
    n_wake++;
    cyc = 0;
    while (restore_busy) begin @(negedge clk); cyc++; end
    chk(cyc <= 131, $sformatf("restore took %0d cycles", cyc));
    n_restore++;
  endtask

  // one round of the application: sample the sensor, keep a running sum in
  // the scratchpad, store the processed samples in the data RRAM
  task automatic app_round(input int base, input int n);
    logic [15:0] q, s, acc; logic e; int lat;
    bus(1, SRAM_BASE + 16'h0010, 16'h0, q, e, lat); n_sram++;
    for (int i = 0; i < n; i++) begin
      bus(0, PERIPH_BASE + 16'h0020, 0, s, e, lat); n_periph++;
      chk(!e && lat == 1, "sensor read");
      bus(0, SRAM_BASE + 16'h0010, 0, acc, e, lat); n_sram++;
      bus(1, SRAM_BASE + 16'h0010, acc + s, q, e, lat); n_sram++;
      dwrite(base + i, acc + s, lat);
    end
    bus(0, SRAM_BASE + 16'h0010, 0, acc, e, lat); n_sram++;
    chk(acc == model[base + n - 1], "scratchpad sum matches last result");
  endtask

  initial begin
    #1000000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [15:0] q; logic e; int lat, r0, slot, phys;
    logic [15:0] prog_img [64];
    core_req_i = '0;
    for (int l = 0; l < 2048; l++) model[l] = 16'h0000;  // RRAM starts erased
    repeat (2) @(negedge clk); rst_n = 1;
    repeat (2) @(posedge clk); #1;
    chk(core_rst_n && mode == PM_ACTIVE, "boot releases the core in 2 cycles");
    while (restore_busy) @(negedge clk);
    n_restore++;

    // program the instruction RRAM, one word needs 6 attempts
    inject(INJ_IMEM, 7, 5);
    for (int i = 0; i < 64; i++) begin
      prog_img[i] = 16'h4000 + 16'(i * 37);
      @(negedge clk); prog_req = 1; prog_addr = 13'(i); prog_wdata = prog_img[i];
      @(negedge clk); prog_req = 0; lat = 2;
      while (!prog_done) begin @(negedge clk); lat++; end
      chk(prog_ok, "program word");
      if (lat > 5) n_prog_retry++;
    end
    // fetch it back through the core's fetch port
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); ifetch_req = 1; ifetch_addr = IRRAM_BASE + 16'(2 * i);
      @(negedge clk); ifetch_req = 0;
      chk(ifetch_valid && ifetch_data == prog_img[i], $sformatf("fetch %0d", i));
      n_fetch++;
    end

    // application with write failures in the data RRAM
    app_round(0, 16);
    inject(INJ_DMAIN, 20 ^ int'(endurer_key), 2);      // temporary failure
    dwrite(20, 16'hAAAA, lat);
    chk(lat == 13, $sformatf("retried write %0d cycles", lat)); n_dretry++;
    r0 = n_remap;
    inject(INJ_DMAIN, 21 ^ int'(endurer_key), 15);     // permanent failure
    dwrite(21, 16'hBBBB, lat);
    chk(n_remap == r0 + 1 && lat == 26, $sformatf("remap: lat %0d", lat));
    slot = int'(lut_used);
    inject(INJ_BACKUP, slot, 15);                       // bad backup slot
    inject(INJ_DMAIN, 22 ^ int'(endurer_key), 15);
    dwrite(22, 16'hCCCC, lat);
    chk(int'(lut_used) == slot + 2, "bad backup slot skipped"); n_slot_skip++;
    app_round(32, 16);
    dread_chk(21, "remapped"); dread_chk(22, "remapped");
    bus(0, 16'h1000, 0, q, e, lat);
    chk(e, "unmapped address answered with err"); n_unmapped++;

    // first shutdown and wake-up
    shutdown_wake();
    for (int l = 0; l < 48; l++) dread_chk(l, "after wake 1");

    // let ENDURER move the data, keep working meanwhile
    while (n_move == 0) begin
      app_round(64, 8);
      repeat (100) @(negedge clk);
    end
    for (int l = 0; l < 72; l++) dread_chk(l, "after ENDURER move");

    // a table word that cannot be written: its entry is invalidated
    slot = int'(lut_used);
    inject(INJ_BACKUP, 128 + slot, 15);
    phys = 40 ^ int'(endurer_key);
    inject(INJ_DMAIN, phys, 15);
    dwrite(40, 16'hDDDD, lat);
    dread_chk(40, "remapped before shutdown");
    shutdown_wake();
    chk(n_inval >= 1, "table word invalidated");
    model[40] = 16'hDDDD ^ 16'h0001;   // the mapping is lost, the failed word is read
    for (int l = 0; l < 72; l++) dread_chk(l, "after wake 2");

    // MLC weight coding
    for (int w = -24; w <= 24; w += 7) begin
      mlc_enc_weight = 6'(w); #1;
      mlc_dec_sign = mlc_enc_sign; mlc_dec_hi = mlc_enc_hi; mlc_dec_lo = mlc_enc_lo; #1;
      chk(mlc_dec_weight == 6'(w) && int'(mlc_enc_hi) * 5 + int'(mlc_enc_lo) == (w < 0 ? -w : w),
          $sformatf("mlc weight %0d", w));
      n_mlc++;
    end

    // wear out enough words to fill the remap table: the next write is lost
    while (endurer_busy) @(negedge clk);
    for (int l = 100; l < 300 && n_lost == 0; l++) begin
      inject(INJ_DMAIN, l ^ int'(endurer_key), 15);
      dwrite(l, 16'(l), lat);
    end
    chk(int'(lut_used) == 128, "table full");
    shutdown_wake();

    chk(n_prog_retry > 0, "instruction programming retry happened");
    chk(n_fetch > 0 && n_sram > 0 && n_periph > 0, "fetch, SRAM and sensor accesses happened");
    chk(n_dretry > 0, "data write retry happened");
    chk(n_remap > 0 && n_slot_skip > 0, "remapping happened");
    chk(n_save > 0 && n_shutdown > 0 && n_wake > 0 && n_restore > 0, "shutdown and wake-up happened");
    chk(n_inval > 0, "table invalidation happened");
    chk(n_move > 0, "ENDURER move happened");
    chk(n_unmapped > 0 && n_lost > 0 && n_mlc > 0, "unmapped, lost write, MLC coding happened");
    $display("counts: prog_retry=%0d fetch=%0d sram=%0d periph=%0d dretry=%0d remap=%0d slot_skip=%0d save=%0d inval=%0d shutdown=%0d wake=%0d restore=%0d move=%0d unmapped=%0d lost=%0d mlc=%0d",
             n_prog_retry, n_fetch, n_sram, n_periph, n_dretry, n_remap, n_slot_skip, n_save,
             n_inval, n_shutdown, n_wake, n_restore, n_move, n_unmapped, n_lost, n_mlc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
