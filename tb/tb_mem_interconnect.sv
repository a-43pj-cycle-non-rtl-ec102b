// tb_mem_interconnect: checks the data-bus decoder with three target models
// that answer after different delays with a value made from their own
// identity and the word index they received. Every mapped address must
// reach exactly one target with the right word index; unmapped addresses
// must end with err.
module tb_mem_interconnect;
  import nvmcu_pkg::*;
  logic clk = 0, rst_n = 0;
  bus_req_t core_i, periph_o, sram_o, drram_o;
  bus_rsp_t core_o, periph_i, sram_i, drram_i;
  int checks = 0, failures = 0;

  mem_interconnect dut (.*);
  always #5 clk = ~clk;

  // target t answers after t+1 cycles with {t, word index}
  int cnt [3];
  always @(posedge clk) begin
    bus_req_t r [3];
    r[0] = periph_o; r[1] = sram_o; r[2] = drram_o;
    for (int t = 0; t < 3; t++) begin
      if (r[t].req && cnt[t] < t + 1) cnt[t] <= cnt[t] + 1; else cnt[t] <= 0;
    end
  end
  function automatic bus_rsp_t rsp(input int t, input bus_req_t r);
    rsp.ready = r.req && cnt[t] == t + 1;
    rsp.err   = 1'b0;
    rsp.rdata = {4'(t), r.addr[11:0]};
  endfunction
  assign periph_i = rsp(0, periph_o);
  assign sram_i   = rsp(1, sram_o);
  assign drram_i  = rsp(2, drram_o);

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic access(input logic [15:0] a, input int exp_t, input int exp_idx);
    int lat, nreq;
    @(negedge clk); core_i = '{req: 1'b1, we: 1'b0, addr: a, wdata: 16'h0}; lat = 1; #1;
    nreq = int'(periph_o.req) + int'(sram_o.req) + int'(drram_o.req);
    chk(nreq == (exp_t < 0 ? 0 : 1), $sformatf("addr %h reaches %0d targets", a, nreq));
    while (!core_o.ready && lat < 20) begin @(negedge clk); lat++; end
    if (exp_t < 0) chk(core_o.err && lat == 2, $sformatf("unmapped %h: err %0d lat %0d", a, core_o.err, lat));
    else chk(!core_o.err && core_o.rdata == {4'(exp_t), 12'(exp_idx)} && lat == exp_t + 2,
             $sformatf("addr %h -> %h lat %0d", a, core_o.rdata, lat));
    @(posedge clk); #1; core_i.req = 0;
  endtask

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    core_i = '0; cnt[0] = 0; cnt[1] = 0; cnt[2] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      logic [15:0] a;
      a = 16'($urandom) & 16'hFFFE;
      if (a <= 16'h01FF) access(a, 0, int'(a >> 1));
      else if (a >= 16'h2000 && a <= 16'h3FFF) access(a, 1, int'((a - 16'h2000) >> 1));
      else if (a >= 16'hC000 && a <= 16'hCFFF) access(a, 2, int'((a - 16'hC000) >> 1));
      else access(a, -1, 0);
    end
    access(16'h0000, 0, 0);   access(16'h01FE, 0, 255);
    access(16'h2000, 1, 0);   access(16'h3FFE, 1, 4095);
    access(16'hC000, 2, 0);   access(16'hCFFE, 2, 2047);
    access(16'h0200, -1, 0);  access(16'hD000, -1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
