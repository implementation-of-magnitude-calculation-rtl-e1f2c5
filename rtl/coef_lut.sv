// coef_lut -- LT6 and LT7: the coefficient pair (alpha_i, beta_i) of the
// selected region.
//
// Two small tables addressed by the region index.  alpha_i and beta_i are
// unsigned COEF_W-bit fractions (LSB 2^-11) taken from amb_pkg, where they are
// defined as (1+e)cos(phi_i) and (1+e)sin(phi_i) for the sector centres phi_i.
// Purely combinational.
//
// Interface: region_i in; alpha_o, beta_o (COEF_W bits) out.  The two tables,
// the beta values and the 11-bit word length follow the original design; the
// alpha values are derived from the same equiripple construction.
module coef_lut
  #(
  parameter int unsigned COEF_W = amb_pkg::COEF_W
) (
  input  logic [amb_pkg::REG_W-1:0]  region_i,
  output logic [COEF_W-1:0] alpha_o,
  output logic [COEF_W-1:0] beta_o
);

  assign alpha_o = COEF_W'(amb_pkg::ALPHA[region_i]);   // LT6
  assign beta_o  = COEF_W'(amb_pkg::BETA[region_i]);    // LT7

endmodule
