// recp_lut -- the four look-up tables LT1..LT4 of the reciprocal unit.
//
// LT1, LT2 and LT3 are addressed by the upper segment a of the divisor and
// hold 1/a, 1/(a(a+K1)) and 1/(a(a+K1)(a+K2)); LT4 is addressed by the lower
// segment b and holds the signed difference K1 - b.  Because a is a multiple of
// 2^B_W, a table entry for index A represents a = A * 2^B_W.  The contents are
// computed at elaboration by the functions of amb_pkg (round to nearest), so
// the tables synthesise to ROMs or plain logic.  Purely combinational.
//
// Interface: a_i (A_W bits), b_i (B_W bits) in; lt1_o..lt3_o unsigned and
// lt4_o two's complement, LUT_W bits each, with the LSB weights listed in
// amb_pkg.  Table formulas, segment sizes, K1, K2 and the 14-bit word length
// follow the original design; the LSB weights and the entries for a = 0
// (never used: the divisor is normalised to a >= 1) are this design's choices.
module recp_lut
  #(
  parameter int unsigned A_W   = amb_pkg::A_W,
  parameter int unsigned B_W   = amb_pkg::B_W,
  parameter int unsigned LUT_W = amb_pkg::LUT_W
) (
  input  logic [A_W-1:0]   a_i,
  input  logic [B_W-1:0]   b_i,
  output logic [LUT_W-1:0] lt1_o,
  output logic [LUT_W-1:0] lt2_o,
  output logic [LUT_W-1:0] lt3_o,
  output logic [LUT_W-1:0] lt4_o
);

  localparam int unsigned NA = 1 << A_W;
  localparam int unsigned NB = 1 << B_W;

  // The package functions are written for the package's segment sizes.
  initial begin
    assert (A_W == amb_pkg::A_W && B_W == amb_pkg::B_W && LUT_W == amb_pkg::LUT_W)
      else $error("recp_lut: table formulas are defined for A_W=%0d B_W=%0d LUT_W=%0d",
                  amb_pkg::A_W, amb_pkg::B_W, amb_pkg::LUT_W);
  end

  logic [LUT_W-1:0] lt1 [NA];
  logic [LUT_W-1:0] lt2 [NA];
  logic [LUT_W-1:0] lt3 [NA];
  logic [LUT_W-1:0] lt4 [NB];

  for (genvar i = 0; i < NA; i++) begin : g_lta
    assign lt1[i] = LUT_W'(amb_pkg::lt1_value(i));
    assign lt2[i] = LUT_W'(amb_pkg::lt2_value(i));
    assign lt3[i] = LUT_W'(amb_pkg::lt3_value(i));
  end
  for (genvar j = 0; j < NB; j++) begin : g_ltb
    assign lt4[j] = LUT_W'(amb_pkg::lt4_value(j));
  end

  assign lt1_o = lt1[a_i];
  assign lt2_o = lt2[a_i];
  assign lt3_o = lt3[a_i];
  assign lt4_o = lt4[b_i];

endmodule
