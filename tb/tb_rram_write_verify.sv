// tb_rram_write_verify: drives the write-verify sequencer against an RRAM
// model. Checks that a clean write takes 5 cycles and one attempt, that a
// temporary failure is retried (4 cycles per retry), and that a permanent
// failure ends after 1 + 4 attempts with ok low. Stored data is checked too.
module tb_rram_write_verify;
  logic clk = 0, rst_n = 0, start, busy, done, ok;
  logic [10:0] addr, mem_addr, inj_addr;
  logic [15:0] wdata, mem_wdata, mem_rdata, rdata_chk;
  logic [3:0] attempts, inj_cnt;
  logic mem_we, mem_re, inj_we, re_tb;
  int checks = 0, failures = 0;

  rram_write_verify #(.AW(11), .MAX_RETRIES(4)) dut (.*);
  rram_macro #(.DEPTH(2048)) mem (
    .clk, .pwr_en(1'b1), .re(mem_re || re_tb), .we(mem_we),
    .addr(re_tb ? addr : mem_addr), .wdata(mem_wdata), .rdata(mem_rdata),
    .inj_we, .inj_addr, .inj_cnt);
  assign rdata_chk = mem_rdata;

  always #5 clk = ~clk;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic inject(input int a, input int n);
    @(negedge clk); inj_we = 1; inj_addr = 11'(a); inj_cnt = 4'(n);
    @(negedge clk); inj_we = 0;
  endtask

  // returns the cycles from the start cycle to the done cycle, inclusive
  task automatic do_write(input int a, input logic [15:0] d, output int cyc,
                          output logic res, output int att);
    @(negedge clk); start = 1; addr = 11'(a); wdata = d;
    @(negedge clk); start = 0; cyc = 2;
    while (!done) begin @(negedge clk); cyc++; end
    res = ok; att = int'(attempts);
    @(negedge clk);
  endtask

  task automatic read_back(input int a, input logic [15:0] exp, input string what);
    @(negedge clk); re_tb = 1; addr = 11'(a);
    @(negedge clk); re_tb = 0;
    chk(rdata_chk == exp, $sformatf("%s stored %h exp %h", what, rdata_chk, exp));
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int cyc, att; logic res;
    start = 0; addr = 0; wdata = 0; inj_we = 0; inj_addr = 0; inj_cnt = 0; re_tb = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int k = 0; k < 10; k++) begin
      logic [15:0] d;
      d = 16'($urandom);
      do_write(100 + k, d, cyc, res, att);
      chk(res && att == 1, "clean write ok, one attempt");
      chk(cyc == 5, $sformatf("clean write took %0d cycles, exp 5", cyc));
      read_back(100 + k, d, "clean");
    end
    for (int n = 1; n <= 4; n++) begin
      inject(200 + n, n);
      do_write(200 + n, 16'hBEE0, cyc, res, att);
      chk(res && att == n + 1, $sformatf("twf %0d: ok=%0d attempts=%0d", n, res, att));
      chk(cyc == 5 + 4 * n, $sformatf("twf %0d took %0d cycles", n, cyc));
      read_back(200 + n, 16'hBEE0, "twf");
    end
    inject(300, 5);
    do_write(300, 16'h5555, cyc, res, att);
    chk(!res && att == 5, $sformatf("5 failures exhaust retries: ok=%0d att=%0d", res, att));
    inject(301, 15);
    do_write(301, 16'h7777, cyc, res, att);
    chk(!res && att == 5, "permanent failure reported");
    chk(cyc == 5 + 4 * 4, $sformatf("failed write took %0d cycles", cyc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
