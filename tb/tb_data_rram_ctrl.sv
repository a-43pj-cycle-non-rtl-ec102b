// tb_data_rram_ctrl: checks the data-RRAM controller with dynamic address
// remapping. Clean reads (2 cycles) and writes (5 cycles), temporary write
// failures absorbed by retries, permanent failures remapped to the backup
// array (26 cycles), a failing backup slot skipped, the save of only the
// changed table entries, table loss at power-off and its restore, an
// unwritable non-volatile table word marked invalid, and the full table.
module tb_data_rram_ctrl;
  import nvmcu_pkg::*;
  logic clk = 0, rst_n = 0, pwr_en = 1;
  bus_req_t bus_i;
  bus_rsp_t bus_o;
  logic save_req = 0, save_done, restore_req = 0, restore_busy;
  logic inj_we = 0, inj_backup = 0;
  logic [10:0] inj_addr = 0;
  logic [3:0] inj_cnt = 0;
  logic remap_evt, nvlut_inval_evt, lost_evt;
  logic [7:0] lut_used;
  int checks = 0, failures = 0, remaps = 0, invals = 0, losts = 0;
  logic [15:0] model [2048];
  logic        known [2048];

  data_rram_ctrl dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (remap_evt) remaps++;
    if (nvlut_inval_evt) invals++;
    if (lost_evt) losts++;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic inject(input logic bk, input int a, input int n);
    @(negedge clk); inj_we = 1; inj_backup = bk; inj_addr = 11'(a); inj_cnt = 4'(n);
    @(negedge clk); inj_we = 0;
  endtask

  // lat: cycles from the request cycle to the ready cycle, inclusive
  task automatic access(input logic we, input int a, input logic [15:0] d,
                        output logic [15:0] q, output logic err, output int lat);
    @(negedge clk); bus_i = '{req: 1'b1, we: we, addr: 16'(a), wdata: d}; lat = 1;
    while (!bus_o.ready && lat < 200) begin @(negedge clk); lat++; end
    q = bus_o.rdata; err = bus_o.err;
    @(posedge clk); #1; bus_i.req = 0;
  endtask

  task automatic write(input int a, input logic [15:0] d, output int lat);
    logic [15:0] q; logic e;
    access(1, a, d, q, e, lat);
    model[a] = d; known[a] = 1;
  endtask

  task automatic read_chk(input int a, input string what);
    logic [15:0] q; logic e; int lat;
    access(0, a, 0, q, e, lat);
    chk(q == model[a] && lat == 2, $sformatf("%s: read %0d got %h exp %h lat %0d", what, a, q, model[a], lat));
  endtask

  task automatic restore(output int cyc);
    @(negedge clk); restore_req = 1; @(negedge clk); restore_req = 0; cyc = 1;
    while (restore_busy && cyc < 1000) begin @(negedge clk); cyc++; end
  endtask

  task automatic save(output int cyc);
    @(negedge clk); save_req = 1; cyc = 1;
    while (!save_done && cyc < 5000) begin @(negedge clk); cyc++; end
    @(posedge clk); #1; save_req = 0;
  endtask

  task automatic power_cycle();
    int cyc;
    @(negedge clk); pwr_en = 0; repeat (5) @(negedge clk); pwr_en = 1;
    restore(cyc);
    chk(cyc <= 132, $sformatf("restore took %0d cycles", cyc));
  endtask

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int lat, cyc, r0; logic [15:0] q; logic e;
    bus_i = '0;
    for (int i = 0; i < 2048; i++) known[i] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    restore(cyc);
    chk(cyc >= 129 && cyc <= 132, $sformatf("boot restore %0d cycles", cyc));
    // clean traffic
    for (int n = 0; n < 200; n++) begin
      int a;
      a = $urandom_range(0, 2047);
      if (!known[a] || $urandom_range(0, 1) == 1) begin
        write(a, 16'($urandom), lat);
        chk(lat == 5, $sformatf("clean write %0d cycles", lat));
      end else read_chk(a, "clean");
    end
    // temporary failure: 3 failing attempts, no remap
    inject(0, 5, 3);
    write(5, 16'h1111, lat);
    chk(lat == 17 && remaps == 0 && lut_used == 0, $sformatf("twf: lat %0d remaps %0d", lat, remaps));
    read_chk(5, "twf");
    // permanent failure: remapped to slot 0
    inject(0, 10, 15);
    write(10, 16'h2222, lat);
    chk(lat == 26 && remaps == 1 && lut_used == 1, $sformatf("remap: lat %0d used %0d", lat, lut_used));
    read_chk(10, "remapped");
    write(10, 16'h2323, lat);
    chk(lat == 5 && lut_used == 1, "write to remapped word goes to its slot");
    read_chk(10, "remapped rewrite");
    // failing backup slot 1 is skipped, slot 2 used
    inject(1, 1, 15);
    inject(0, 20, 15);
    write(20, 16'h3333, lat);
    chk(remaps == 2 && lut_used == 3, $sformatf("slot skip: used %0d", lut_used));
    read_chk(20, "remapped past bad slot");
    // save only the 3 changed entries
    save(cyc);
    chk(invals == 0 && cyc <= 3 * 6 + 2, $sformatf("save took %0d cycles", cyc));
    save(cyc);
    chk(cyc <= 2, $sformatf("save with nothing changed took %0d cycles", cyc));
    // power off loses the volatile table; restore brings it back
    power_cycle();
    chk(lut_used == 3, "table size after restore");
    read_chk(10, "after restore");
    read_chk(20, "after restore");
    read_chk(5, "after restore");
    for (int a = 0; a < 2048; a++) if (known[a] && a % 7 == 0) read_chk(a, "after restore");
    // an unwritable non-volatile word: the entry is marked invalid
    inject(1, 128 + 3, 15);
    inject(0, 30, 15);
    write(30, 16'h4444, lat);
    read_chk(30, "remapped to slot 3");
    save(cyc);
    chk(invals == 1, "non-volatile table word failed, entry invalidated");
    power_cycle();
    access(0, 30, 0, q, e, lat);
    chk(q == (16'h4444 ^ 16'h0001), $sformatf("invalid entry not restored: %h", q));
    model[30] = q;
    read_chk(10, "valid entries still restored");
    // fill the table: slot 3 (its entry was lost) and slots 4..127
    r0 = remaps;
    for (int k = 0; k < 125; k++) begin
      inject(0, 1000 + k, 15);
      write(1000 + k, 16'(k * 3), lat);
    end
    chk(remaps == r0 + 125 && lut_used == 128, $sformatf("table full: used %0d", lut_used));
    inject(0, 1500, 15);
    access(1, 1500, 16'h5555, q, e, lat);
    chk(e && losts == 1, "write lost when the table is full");
    for (int k = 0; k < 124; k += 11) read_chk(1000 + k, "full table lookup");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
