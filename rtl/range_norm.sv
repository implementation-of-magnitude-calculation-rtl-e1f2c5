// range_norm -- divisor normalisation in front of the reciprocal unit.
//
// The reciprocal tables assume an upper segment a >= 1, i.e. x >= 64.  For a
// smaller x both x and y are shifted left by the same number of places, the
// fewest that bring x to 64 or more; the quotient y/x is unchanged and y <= x
// keeps y within MAG_W bits.  x = 0 (and so y = 0) passes unchanged.  Purely
// combinational.
//
// Interface: x_i, y_i (MAG_W bits) in; x_o, y_o (MAG_W bits) out.  This step
// is not part of the original design, which only states the algorithm for
// a >= a_min = 64; it is this design's way of covering small inputs.
module range_norm
  import amb_pkg::*;
(
  input  logic [MAG_W-1:0] x_i,
  input  logic [MAG_W-1:0] y_i,
  output logic [MAG_W-1:0] x_o,
  output logic [MAG_W-1:0] y_o
);

  localparam int unsigned MAX_SHIFT = B_W;   // x = 1 needs 6 places

  logic [$clog2(MAX_SHIFT+1)-1:0] shift;

  always_comb begin
    shift = '0;
    for (int s = MAX_SHIFT; s >= 1; s--)
      if ((x_i >> (B_W - s)) == MAG_W'(1)) shift = ($clog2(MAX_SHIFT+1))'(s);
    x_o = x_i << shift;
    y_o = y_i << shift;
  end

endmodule
