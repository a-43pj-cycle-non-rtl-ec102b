// tb_endurer: runs ENDURER (64 words, period 300 cycles) in front of a
// memory model that answers after 1 to 3 cycles, while a core process reads
// and writes random logical addresses. Checks every read against a
// reference, that each completed remapping changes the key and leaves word
// l at physical address l ^ key, that a move touches every word once for
// reading and once for writing, that core accesses wait during a move, and
// that a core issuing back-to-back accesses cannot hold a move off.
module tb_endurer;
  import nvmcu_pkg::*;
  localparam int DEPTH = 64;
  logic clk = 0, rst_n = 0, run = 1, busy, remap_evt;
  bus_req_t core_i, mem_o;
  bus_rsp_t core_o, mem_i;
  logic [5:0] key;
  int checks = 0, failures = 0, moves = 0, mem_rd = 0, mem_wr = 0, waited = 0;
  logic [15:0] phys [DEPTH];
  logic [15:0] model [DEPTH];
  logic [5:0] last_key;

  endurer #(.DEPTH(DEPTH), .BUF_WORDS(8), .PERIOD_CYCLES(300)) dut (.*);
  always #5 clk = ~clk;

  // memory model: answers after a random 1..3 cycles
  int wait_q = 0, lim = 1;
  always_comb begin
    mem_i.ready = mem_o.req && wait_q == lim;
    mem_i.err   = 1'b0;
    mem_i.rdata = phys[mem_o.addr[5:0]];
  end
  always @(posedge clk) begin
    if (mem_o.req) begin
      if (wait_q == lim) begin
        if (mem_o.we) begin phys[mem_o.addr[5:0]] <= mem_o.wdata; mem_wr++; end
        else mem_rd++;
        wait_q <= 0; lim <= $urandom_range(1, 3);
      end else wait_q <= wait_q + 1;
    end
    if (busy && core_i.req) waited++;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (remap_evt) begin
    moves++;
    #1;
    chk(key != last_key, "key changes");
    for (int l = 0; l < DEPTH; l++)
      chk(phys[6'(l) ^ key] == model[l], $sformatf("word %0d at %0d after move", l, 6'(l) ^ key));
    chk(mem_rd == DEPTH && mem_wr == DEPTH, $sformatf("move: %0d reads %0d writes", mem_rd, mem_wr));
    last_key = key;
  end

  task automatic access(input logic we, input int a, input logic [15:0] d, output logic [15:0] q);
    @(negedge clk); core_i = '{req: 1'b1, we: we, addr: 16'(a), wdata: d};
    while (!core_o.ready) @(negedge clk);
    q = core_o.rdata;
    @(posedge clk); #1; core_i.req = 0;
    mem_rd = 0; mem_wr = 0;
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [15:0] q;
    core_i = '0; last_key = 0;
    for (int i = 0; i < DEPTH; i++) phys[i] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int l = 0; l < DEPTH; l++) begin
      model[l] = 16'($urandom);
      access(1, l, model[l], q);
    end
    while (moves < 5) begin
      int a;
      a = $urandom_range(0, DEPTH - 1);
      if ($urandom_range(0, 3) == 0) begin
        logic [15:0] d;
        d = 16'($urandom); access(1, a, d, q); model[a] = d;
      end else begin
        access(0, a, 0, q);
        chk(q == model[a], $sformatf("read %0d got %h exp %h", a, q, model[a]));
      end
      repeat ($urandom_range(0, 4)) @(negedge clk);
    end
    chk(waited > 0, "core access waited during a move");
    // no move while run is low
    run = 0;
    while (busy) @(negedge clk);
    begin
      int m0;
      m0 = moves;
      repeat (1000) @(negedge clk);
      chk(moves == m0 && !busy, $sformatf("no move while run is low %0d %0d %0d", moves, m0, busy));
    end
    // back-to-back core accesses must not starve the remapping
    run = 1;
    begin
      int m0;
      m0 = moves;
      repeat (400) begin
        int a;
        a = $urandom_range(0, DEPTH - 1);
        access(0, a, 0, q);
        chk(q == model[a], $sformatf("back-to-back read %0d", a));
      end
      chk(moves > m0, "move happens under back-to-back accesses");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
