// tb_mlc_weight_codec: exhaustive check of the weight encoding (two base-5
// magnitude digits and a sign cell) and of the decoding of every level
// combination, against values computed here.
module tb_mlc_weight_codec;
  logic signed [5:0] enc_weight, dec_weight;
  logic enc_sign, dec_sign;
  logic [2:0] enc_hi, enc_lo, dec_hi, dec_lo;
  int checks = 0, failures = 0;

  mlc_weight_codec #(.LEVELS(5)) dut (.*);

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int w = -32; w < 32; w++) begin
      int m, s;
      s = (w < 0); m = (w < 0) ? -w : w;
      if (m > 24) m = 24;
      enc_weight = 6'(w); #1;
      chk(enc_sign == s && int'(enc_hi) == m / 5 && int'(enc_lo) == m % 5,
          $sformatf("encode %0d -> %0d %0d %0d", w, enc_sign, enc_hi, enc_lo));
      dec_sign = enc_sign; dec_hi = enc_hi; dec_lo = enc_lo; #1;
      chk(int'(dec_weight) == (s ? -m : m), $sformatf("round trip %0d -> %0d", w, dec_weight));
    end
    for (int sg = 0; sg < 2; sg++)
      for (int h = 0; h < 8; h++)
        for (int l = 0; l < 8; l++) begin
          int hh, ll, e;
          hh = (h > 4) ? 4 : h; ll = (l > 4) ? 4 : l;
          e = 5 * hh + ll; if (sg == 1) e = -e;
          dec_sign = sg[0]; dec_hi = 3'(h); dec_lo = 3'(l); #1;
          chk(int'(dec_weight) == e, $sformatf("decode %0d %0d %0d -> %0d", sg, h, l, dec_weight));
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
