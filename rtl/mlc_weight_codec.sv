// mlc_weight_codec: maps a signed neural-network weight onto multi-level
// RRAM cells and back.
//
// The published chip stores up to 5 resistance levels per RRAM cell (2.3 b
// per cell) and encodes each weight as two 5-level cells for the magnitude
// and one 2-level cell for the sign. With LEVELS = 5 the magnitude is a
// two-digit base-5 number, 0 to 24: mag = LEVELS*hi + lo. Encoding
// saturates weights beyond +-24. Decoding clamps a level read above the top
// level (a cell outside its resistance window) to the top level. The base-5
// digit order, the saturation and the clamping are this design's choices.
//
// Purely combinational: enc_* and dec_* are independent paths.
module mlc_weight_codec #(
  parameter int unsigned LEVELS  = 5,
  localparam int unsigned MAG_MAX = LEVELS * LEVELS - 1,
  localparam int unsigned MW      = $clog2(MAG_MAX + 1),
  localparam int unsigned LW      = $clog2(LEVELS)
) (
  input  logic signed [MW:0] enc_weight,
  output logic               enc_sign,
  output logic [LW-1:0]      enc_hi,
  output logic [LW-1:0]      enc_lo,
  input  logic               dec_sign,
  input  logic [LW-1:0]      dec_hi,
  input  logic [LW-1:0]      dec_lo,
  output logic signed [MW:0] dec_weight
);

  logic [MW:0]   mag;
  logic [LW-1:0] h, l;
  logic [MW:0]   dmag;

  always_comb begin
    enc_sign = enc_weight < 0;
    mag      = enc_sign ? (MW+1)'(-enc_weight) : (MW+1)'(enc_weight);
    if (mag > (MW+1)'(MAG_MAX)) mag = (MW+1)'(MAG_MAX);
    enc_hi   = LW'(mag / (MW+1)'(LEVELS));
    enc_lo   = LW'(mag % (MW+1)'(LEVELS));

    h = (dec_hi > LW'(LEVELS - 1)) ? LW'(LEVELS - 1) : dec_hi;
    l = (dec_lo > LW'(LEVELS - 1)) ? LW'(LEVELS - 1) : dec_lo;
    dmag = (MW+1)'(h) * (MW+1)'(LEVELS) + (MW+1)'(l);
    dec_weight = dec_sign ? -$signed(dmag) : $signed(dmag);
  end

endmodule
