// tb_power_scheduler: checks the power-mode sequence. Reset and wake-up
// release the core exactly 2 cycles after the event with a restore request;
// a shutdown request waits for ENDURER, asks for the table save and turns
// the supplies off only after save_done; a wake event during the save is
// remembered.
module tb_power_scheduler;
  import nvmcu_pkg::*;
  logic clk = 0, rst_n = 0, shutdown_req = 0, wake_evt = 0, endurer_busy = 0;
  logic save_req, save_done = 0, restore_req, core_pwr_en, mem_pwr_en, iso_en, core_rst_n;
  pmode_e mode;
  int checks = 0, failures = 0, restores = 0;

  power_scheduler dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (restore_req) restores++;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // cycles from the wake event's clock edge until core_rst_n is high
  task automatic wake(output int cyc);
    @(negedge clk); wake_evt = 1;
    @(posedge clk); #1; wake_evt = 0; cyc = 0;
    while (!core_rst_n && cyc < 20) begin @(posedge clk); #1; cyc++; end
  endtask

  task automatic shutdown(input int save_cycles);
    @(negedge clk); shutdown_req = 1;
    @(posedge clk); #1;
    chk(save_req && mode == PM_SAVE && core_pwr_en, "save requested, power still on");
    repeat (save_cycles) begin @(negedge clk); chk(save_req && mem_pwr_en, "holds during save"); end
    @(negedge clk); save_done = 1;
    @(posedge clk); #1; save_done = 0; shutdown_req = 0;
    chk(mode == PM_OFF && !core_pwr_en && !mem_pwr_en && iso_en && !core_rst_n, "off");
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int cyc;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(posedge clk); #1; chk(!core_rst_n && mem_pwr_en, "boot cycle 1");
    @(posedge clk); #1; chk(core_rst_n && mode == PM_ACTIVE, "boot: active after 2 cycles");
    chk(restores == 1, "restore requested at boot");
    for (int n = 0; n < 4; n++) begin
      shutdown(n * 3);
      repeat (5) @(negedge clk);
      chk(mode == PM_OFF, "stays off without an event");
      wake(cyc);
      chk(cyc == 2, $sformatf("wake took %0d cycles, exp 2", cyc));
      chk(restores == n + 2, "restore requested at wake");
      chk(!iso_en && core_pwr_en, "power on, isolation off");
    end
    // shutdown waits for ENDURER
    @(negedge clk); endurer_busy = 1; shutdown_req = 1;
    repeat (5) begin @(negedge clk); chk(mode == PM_ACTIVE && !save_req, "waits for ENDURER"); end
    endurer_busy = 0;
    @(posedge clk); #1; chk(mode == PM_SAVE, "save after ENDURER");
    // wake event during the save is remembered
    @(negedge clk); wake_evt = 1; @(negedge clk); wake_evt = 0;
    save_done = 1; @(negedge clk); save_done = 0; shutdown_req = 0;
    chk(mode == PM_OFF, "off after save");
    @(posedge clk); #1; chk(mode == PM_WAKE_PWR, "early wake taken");
    repeat (2) @(posedge clk); #1;
    chk(core_rst_n && mode == PM_ACTIVE, "active again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
