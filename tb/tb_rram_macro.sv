// tb_rram_macro: checks the RRAM array model. Plain writes and one-cycle
// reads, temporary write failures (a given number of failing writes, each
// leaving the written data with FAIL_MASK flipped), permanent write failures,
// and that contents survive and accesses are ignored while power is off.
module tb_rram_macro;
  localparam int DEPTH = 64;
  logic clk = 0, pwr_en, re, we, inj_we;
  logic [5:0] addr, inj_addr;
  logic [15:0] wdata, rdata;
  logic [3:0] inj_cnt;
  int checks = 0, failures = 0;
  logic [15:0] model [DEPTH];

  rram_macro #(.DEPTH(DEPTH), .FAIL_MASK(16'h0001)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(input int a, input logic [15:0] d);
    @(negedge clk); addr = 6'(a); wdata = d; we = 1; re = 0;
    @(negedge clk); we = 0;
  endtask

  task automatic rd_chk(input int a, input logic [15:0] exp, input string what);
    @(negedge clk); addr = 6'(a); re = 1; we = 0;
    @(negedge clk); re = 0;
    chk(rdata == exp, $sformatf("%s addr %0d got %h exp %h", what, a, rdata, exp));
  endtask

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    pwr_en = 1; re = 0; we = 0; inj_we = 0; addr = 0; wdata = 0; inj_addr = 0; inj_cnt = 0;
    for (int i = 0; i < DEPTH; i++) begin
      model[i] = 16'($urandom);
      wr(i, model[i]);
    end
    for (int i = 0; i < DEPTH; i++) rd_chk(i, model[i], "plain");
    // temporary failure: two failing writes, then success
    @(negedge clk); inj_we = 1; inj_addr = 6'd10; inj_cnt = 4'd2;
    @(negedge clk); inj_we = 0;
    wr(10, 16'h1234); rd_chk(10, 16'h1235, "twf attempt 1");
    wr(10, 16'h1234); rd_chk(10, 16'h1235, "twf attempt 2");
    wr(10, 16'h1234); rd_chk(10, 16'h1234, "twf attempt 3");
    // permanent failure
    @(negedge clk); inj_we = 1; inj_addr = 6'd20; inj_cnt = 4'hF;
    @(negedge clk); inj_we = 0;
    for (int k = 0; k < 6; k++) begin
      wr(20, 16'hA5A4 + 16'(k)); rd_chk(20, (16'hA5A4 + 16'(k)) ^ 16'h0001, "pwf");
    end
    rd_chk(21, model[21], "neighbour untouched");
    // power gated: write ignored, contents kept
    @(negedge clk); pwr_en = 0;
    wr(30, ~model[30]);
    @(negedge clk); pwr_en = 1;
    rd_chk(30, model[30], "retained through power-off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
