// tb_scratchpad_sram: random writes and reads against a reference array;
// every access must be answered one cycle after the request.
module tb_scratchpad_sram;
  import nvmcu_pkg::*;
  logic clk = 0, rst_n = 0;
  bus_req_t bus_i;
  bus_rsp_t bus_o;
  int checks = 0, failures = 0;
  logic [15:0] model [4096];
  logic        known [4096];

  scratchpad_sram dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic access(input logic we, input int a, input logic [15:0] d,
                        output logic [15:0] q, output int lat);
    @(negedge clk); bus_i = '{req: 1'b1, we: we, addr: 16'(a), wdata: d}; lat = 0;
    do begin @(posedge clk); #1; lat++; end while (!bus_o.ready && lat < 10);
    q = bus_o.rdata;
    @(negedge clk); bus_i.req = 0;
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [15:0] q; int lat;
    bus_i = '0;
    for (int i = 0; i < 4096; i++) known[i] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int a;
      a = $urandom_range(0, 4095);
      if ($urandom_range(0, 1) == 1 || !known[a]) begin
        logic [15:0] d;
        d = 16'($urandom);
        access(1, a, d, q, lat);
        model[a] = d; known[a] = 1;
      end else begin
        access(0, a, 0, q, lat);
        chk(q == model[a], $sformatf("read %0d got %h exp %h", a, q, model[a]));
      end
      chk(lat == 1, "one-cycle answer");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
