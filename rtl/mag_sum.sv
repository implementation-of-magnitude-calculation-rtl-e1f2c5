// mag_sum -- MULT6, MULT7 and BA3: the magnitude estimate alpha*x + beta*y.
//
// Each 11 x 11 product (coefficient LSB 2^-11) is rounded to an 11-bit
// integer, and BA3 adds the two into an OUT_W-bit result.  With the largest
// coefficients the sum stays below 2^12 for all 11-bit x >= y.  Purely
// combinational.
//
// Interface: max_i, min_i (MAG_W bits), alpha_i, beta_i (COEF_W bits) in;
// mag_o (OUT_W bits) out.  The two multipliers, the adder and the 11/12-bit
// widths follow the original design; rounding the products to nearest is
// this design's choice.
module mag_sum
  #(
  parameter int unsigned OUT_W = amb_pkg::OUT_W
) (
  input  logic [amb_pkg::MAG_W-1:0]  max_i,
  input  logic [amb_pkg::MAG_W-1:0]  min_i,
  input  logic [amb_pkg::COEF_W-1:0] alpha_i,
  input  logic [amb_pkg::COEF_W-1:0] beta_i,
  output logic [OUT_W-1:0]  mag_o
);

  localparam int unsigned P_W = amb_pkg::MAG_W + amb_pkg::COEF_W;

  localparam logic [P_W-1:0] HALF = P_W'(1) << (amb_pkg::COEF_W - 1);

  logic [P_W-1:0]   prod_a, prod_b;   // full products, LSB 2^-11
  logic [amb_pkg::MAG_W-1:0] term_a, term_b;   // MULT6, MULT7 outputs

  always_comb begin
    prod_a = P_W'(max_i) * P_W'(alpha_i);
    prod_b = P_W'(min_i) * P_W'(beta_i);
    // round to nearest integer
    term_a = amb_pkg::MAG_W'((prod_a + HALF) >> amb_pkg::COEF_W);
    term_b = amb_pkg::MAG_W'((prod_b + HALF) >> amb_pkg::COEF_W);
    mag_o  = OUT_W'(term_a) + OUT_W'(term_b);   // BA3
  end

endmodule
