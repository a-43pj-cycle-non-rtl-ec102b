// tb_imem_ctrl: programs the instruction RRAM through the program port and
// fetches it back. Checks 5-cycle clean programming, a temporary failure of
// 6 attempts that the stronger programming (8 retries) still absorbs, a
// permanent failure reported after 9 attempts, one-cycle fetches, and that
// fetches are ignored while the array is power-gated.
module tb_imem_ctrl;
  logic clk = 0, rst_n = 0, pwr_en = 1;
  logic fetch_req = 0, fetch_valid, prog_req = 0, prog_busy, prog_done, prog_ok;
  logic [12:0] fetch_addr = 0, prog_addr = 0, inj_addr = 0;
  logic [15:0] fetch_data, prog_wdata = 0;
  logic inj_we = 0;
  logic [3:0] inj_cnt = 0;
  int checks = 0, failures = 0;
  logic [15:0] model [6144];

  imem_ctrl dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic prog(input int a, input logic [15:0] d, output logic ok, output int lat);
    @(negedge clk); prog_req = 1; prog_addr = 13'(a); prog_wdata = d;
    @(negedge clk); prog_req = 0; lat = 2;
    while (!prog_done && lat < 100) begin @(negedge clk); lat++; end
    ok = prog_ok;
    @(negedge clk);
  endtask

  task automatic fetch(input int a, output logic [15:0] q, output logic v);
    @(negedge clk); fetch_req = 1; fetch_addr = 13'(a);
    @(negedge clk); fetch_req = 0; v = fetch_valid; q = fetch_data;
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int lat; logic ok, v; logic [15:0] q;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int a = 0; a < 64; a++) begin
      model[a] = 16'($urandom);
      prog(a, model[a], ok, lat);
      chk(ok && lat == 5, $sformatf("program %0d: ok %0d lat %0d", a, ok, lat));
    end
    @(negedge clk); inj_we = 1; inj_addr = 13'd6000; inj_cnt = 4'd6; @(negedge clk); inj_we = 0;
    model[6000] = 16'hC0DE;
    prog(6000, model[6000], ok, lat);
    chk(ok && lat == 5 + 4 * 6, $sformatf("stronger programming: ok %0d lat %0d", ok, lat));
    @(negedge clk); inj_we = 1; inj_addr = 13'd6001; inj_cnt = 4'hF; @(negedge clk); inj_we = 0;
    prog(6001, 16'hDEAD, ok, lat);
    chk(!ok && lat == 5 + 4 * 8, $sformatf("permanent failure: ok %0d lat %0d", ok, lat));
    for (int a = 0; a < 64; a++) begin
      fetch(a, q, v);
      chk(v && q == model[a], $sformatf("fetch %0d: %h exp %h", a, q, model[a]));
    end
    fetch(6000, q, v);
    chk(v && q == 16'hC0DE, "fetch retried word");
    @(negedge clk); pwr_en = 0;
    fetch(3, q, v);
    chk(!v, "no fetch while power-gated");
    @(negedge clk); pwr_en = 1;
    fetch(3, q, v);
    chk(v && q == model[3], "contents kept through power-off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
