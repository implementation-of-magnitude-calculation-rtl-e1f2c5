// region_lut -- LT5: selects the approximation region from the quotient r.
//
// A 2^RATIO_W-entry table whose entry for r8 = floor(256 r) is the index of
// the angular region containing r: region k covers
// tan(11.25 k deg) <= r < tan(11.25 (k+1) deg).  The entries are generated
// from the boundary list RBOUND of amb_pkg at elaboration.  Purely
// combinational.
//
// Interface: ratio_i (RATIO_W bits, LSB 2^-8) in; region_o (REG_W bits,
// 0..REGIONS-1) out.  The table, its 8-bit address and 2-bit output follow
// the original design; the boundary values are derived in amb_pkg.
module region_lut
  #(
  parameter int unsigned RATIO_W = amb_pkg::RATIO_W,
  parameter int unsigned REGIONS = amb_pkg::REGIONS
) (
  input  logic [RATIO_W-1:0]         ratio_i,
  output logic [$clog2(REGIONS)-1:0] region_o
);

  localparam int unsigned N = 1 << RATIO_W;

  logic [$clog2(REGIONS)-1:0] lt5 [N];

  for (genvar i = 0; i < N; i++) begin : g_lt5
    assign lt5[i] = $clog2(REGIONS)'(amb_pkg::region_value(i));
  end

  assign region_o = lt5[ratio_i];

endmodule
