// tb_endurer_wear: the endurance workload, scaled down in time. A neural
// network inference makes 258 RRAM writes; here each inference writes 258
// words spread over a hot set of 32 data-RRAM words (the hot-set size is an
// assumption) and inferences run back to back. ENDURER's period is cut from
// 30 minutes to 40000 cycles so that about 20 remappings happen. The test
// counts the application's writes per physical word and requires ENDURER to
// cut the most-written word's count at least in half against a fixed
// mapping, and checks the hot words' contents after every remapping.
module tb_endurer_wear;
  import nvmcu_pkg::*;
  localparam int HOT = 32, WR_PER_INF = 258, INFERENCES = 2000;
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

  nvmcu_top #(.ENDURER_PERIOD(64'd40000)) dut (
    .clk, .rst_n, .ifetch_req(1'b0), .ifetch_addr(16'h0), .ifetch_data, .ifetch_valid,
    .core_req_i, .core_rsp_o, .periph_req_o, .periph_rsp_i,
    .prog_req(1'b0), .prog_addr(13'h0), .prog_wdata(16'h0), .prog_busy, .prog_done, .prog_ok,
    .shutdown_req, .wake_evt, .core_pwr_en, .core_rst_n, .mem_pwr_en, .iso_en, .mode,
    .restore_busy, .endurer_busy, .endurer_key, .endurer_evt, .remap_evt, .nvlut_inval_evt,
    .lost_evt, .lut_used,
    .mlc_enc_weight(6'sd0), .mlc_enc_sign, .mlc_enc_hi, .mlc_enc_lo,
    .mlc_dec_sign(1'b0), .mlc_dec_hi(3'd0), .mlc_dec_lo(3'd0), .mlc_dec_weight,
    .inj_we(1'b0), .inj_sel(INJ_DMAIN), .inj_addr(16'h0), .inj_cnt(4'h0)
  );
  always #50 clk = ~clk;
  assign periph_rsp_i = '{ready: periph_req_o.req, err: 1'b0, rdata: 16'h0};

  int checks = 0, failures = 0, moves = 0;
  int wear [2048];
  logic [15:0] model [HOT];
  always @(posedge clk) if (endurer_evt) moves++;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic bus(input logic we, input int l, input logic [15:0] d, output logic [15:0] q);
    @(negedge clk); core_req_i = '{req: 1'b1, we: we, addr: DRRAM_BASE + 16'(2 * l), wdata: d};
    #1;
    while (!core_rsp_o.ready) @(negedge clk);
    q = core_rsp_o.rdata;
    // the key cannot change while an access is open
    if (we) wear[int'(11'(l) ^ endurer_key)]++;
    @(posedge clk); #1; core_req_i.req = 0;
  endtask

  initial begin
    #2000000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [15:0] q; int seen, mx, total, fixed_max;
    core_req_i = '0;
    for (int i = 0; i < 2048; i++) wear[i] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    while (mode != PM_ACTIVE || restore_busy) @(negedge clk);
    seen = 0;
    for (int n = 0; n < INFERENCES; n++) begin
      for (int w = 0; w < WR_PER_INF; w++) begin
        int l;
        l = (n * WR_PER_INF + w) % HOT;
        model[l] = 16'(n * 7 + w);
        bus(1, l, model[l], q);
      end
      if (moves != seen) begin
        seen = moves;
        for (int l = 0; l < HOT; l++) begin
          bus(0, l, 0, q);
          chk(q == model[l], $sformatf("hot word %0d after move %0d", l, moves));
        end
      end
    end
    mx = 0; total = 0;
    for (int i = 0; i < 2048; i++) begin
      total += wear[i];
      if (wear[i] > mx) mx = wear[i];
    end
    fixed_max = total / HOT;
    $display("%0d writes, %0d remappings: most-written word %0d writes, %0d with a fixed mapping",
             total, moves, mx, fixed_max);
    chk(moves >= 10, $sformatf("%0d remappings", moves));
    chk(mx * 2 <= fixed_max, "ENDURER spreads the wear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
