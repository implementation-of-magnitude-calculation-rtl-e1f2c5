// recp -- RECP, the non-iterative reciprocal unit: R ~ 1/x for an 11-bit x.
//
// The divisor is split into a = x[10:6] (weight 64) and b = x[5:0].  With the
// table words of recp_lut the unit evaluates
//     R = LT1[a] - b*LT2[a] - (b*LT3[a]) * LT4[b]
//       = 1/a - b/(a(a+K1)) - b(K1-b)/(a(a+K1)(a+K2)),
// MULT1 forming b*LT2, MULT2 forming b*LT3, MULT3 multiplying that by the
// signed LT4 word and BA2 adding the three terms.  BA2 works at an LSB of
// 2^-24 (the finest of the three term positions); the result is truncated to
// R_W bits with LSB 2^-19.  Each multiplier output is truncated to the width
// noted below.  Valid for x >= 64 (a >= 1); x < 64 gives a meaningless R, so
// the caller normalises the divisor first; an assertion flags a violation.
// Purely combinational.
//
// Interface: x_i (MAG_W bits) in, r_o (R_W bits, unsigned, LSB 2^-19) out.
// The formula, the table/multiplier/adder structure and the term alignment
// follow the original design; the exact truncation points are this design's.
module recp
  #(
  parameter int unsigned R_W = amb_pkg::R_W
) (
  input  logic [amb_pkg::MAG_W-1:0] x_i,
  output logic [R_W-1:0]   r_o
);

  localparam int unsigned M1_W = 14;   // MULT1 kept: 2^-6 .. 2^-19
  localparam int unsigned M2_W = 14;   // MULT2 kept: LSB 2^-27
  localparam int unsigned M3_W = 18;   // MULT3 kept: signed, LSB 2^-24
  localparam int unsigned S_W  = 26;   // BA2 width, LSB 2^-24

  logic [amb_pkg::A_W-1:0]   a;
  logic [amb_pkg::B_W-1:0]   b;
  logic [amb_pkg::LUT_W-1:0] lt1, lt2, lt3, lt4;

  assign a = x_i[amb_pkg::MAG_W-1:amb_pkg::B_W];
  assign b = x_i[amb_pkg::B_W-1:0];

  recp_lut u_lut (
    .a_i  (a),
    .b_i  (b),
    .lt1_o(lt1),
    .lt2_o(lt2),
    .lt3_o(lt3),
    .lt4_o(lt4)
  );

  logic [amb_pkg::B_W+amb_pkg::LUT_W-1:0]         mult1_full, mult2_full;
  logic [M1_W-1:0]              mult1;    // b/(a(a+K1)),            LSB 2^-19
  logic [M2_W-1:0]              mult2;    // b/(a(a+K1)(a+K2)),      LSB 2^-27
  logic signed [M2_W+amb_pkg::LUT_W:0]   mult3_full;
  logic signed [M3_W-1:0]       mult3;    // b(K1-b)/(a(a+K1)(a+K2)), LSB 2^-24
  logic signed [S_W-1:0]        t1, t2, t3, sum;   // BA2 operands, result

  always_comb begin
    // MULT1: 6 x 14 bits, LSB 2^-25 -> keep LSB 2^-19
    mult1_full = amb_pkg::B_W'(b) * amb_pkg::LUT_W'(lt2);
    mult1      = M1_W'(mult1_full >> (amb_pkg::LT2_F - amb_pkg::R_F));
    // MULT2: 6 x 14 bits, LSB 2^-33 -> keep LSB 2^-27
    mult2_full = amb_pkg::B_W'(b) * amb_pkg::LUT_W'(lt3);
    mult2      = M2_W'(mult2_full >> amb_pkg::B_W);
    // MULT3: unsigned 14 x signed 14 bits, LSB 2^-34 -> keep LSB 2^-24
    mult3_full = $signed({1'b0, mult2}) * $signed(lt4);
    mult3      = M3_W'(mult3_full >>> (amb_pkg::LT3_F - amb_pkg::B_W + amb_pkg::LT4_F - amb_pkg::SUM_F));
    // BA2: all three terms at LSB 2^-24
    t1  = S_W'(lt1) << (amb_pkg::SUM_F - amb_pkg::LT1_F);
    t2  = S_W'(mult1) << (amb_pkg::SUM_F - amb_pkg::R_F);
    t3  = S_W'(mult3);
    sum = t1 - t2 - t3;
    r_o = R_W'(sum >>> (amb_pkg::SUM_F - amb_pkg::R_F));
  end

  // The tables hold no meaningful entry for a = 0: the divisor must be
  // normalised (x >= 64) or zero.
  always_comb
    assert (x_i == '0 || x_i[amb_pkg::MAG_W-1:amb_pkg::B_W] != '0)
      else $error("recp: divisor %0d below 64 reached the reciprocal unit", x_i);

endmodule
