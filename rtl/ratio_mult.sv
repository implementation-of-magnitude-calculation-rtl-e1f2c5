// ratio_mult -- MULT4: the quotient r = y/x as y * (1/x).
//
// Multiplies the reciprocal word from the reciprocal unit (LSB 2^-19) by the
// 11-bit dividend and keeps the fraction bits 2^-1..2^-8 of the product
// (truncation).  A product of 1 or more, which occurs only when y = x, is
// limited to 255/256; every r above the last region boundary selects the same
// coefficients, so the limit changes no result.  Purely combinational.
//
// Interface: recip_i (R_W bits), y_i (MAG_W bits) in; ratio_o (RATIO_W bits,
// LSB 2^-8) out.  The multiplier and its 15/11/8-bit widths follow the
// original design; the choice of output bits and the limiting are this
// design's.
module ratio_mult
  #(
  parameter int unsigned RATIO_W = amb_pkg::RATIO_W
) (
  input  logic [amb_pkg::R_W-1:0]     recip_i,
  input  logic [amb_pkg::MAG_W-1:0]   y_i,
  output logic [RATIO_W-1:0] ratio_o
);

  localparam int unsigned P_W = amb_pkg::R_W + amb_pkg::MAG_W;

  logic [P_W-1:0] prod;
  logic [P_W-1:0] scaled;   // product with LSB 2^-RATIO_W

  always_comb begin
    prod   = P_W'(recip_i) * P_W'(y_i);
    scaled = prod >> (amb_pkg::R_F - RATIO_W);
    if (scaled > P_W'({RATIO_W{1'b1}})) ratio_o = '1;
    else                                ratio_o = scaled[RATIO_W-1:0];
  end

endmodule
