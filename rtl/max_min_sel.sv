// max_min_sel -- first stage of the magnitude calculator: absolute values,
// the comparator BA1 and the two selectors MUX1 (Max) and MUX2 (Min).
//
// Both two's complement inputs are made non-negative (|-2048| saturates to
// 2047 so that the result fits MAG_W bits).  BA1 forms |P| - |Q| in an IN_W-bit
// two's complement adder; the sign bit of the difference drives the select
// inputs of both multiplexers, so MUX1 passes the larger and MUX2 the smaller
// magnitude.  Purely combinational.
//
// Interface: p, q (IN_W-bit signed) in; max_o = max(|p|,|q|),
// min_o = min(|p|,|q|) and sel_o (the BA1 sign, 1 when |p| < |q|) out.
// The comparator/multiplexer structure and the widths follow the original
// design; the absolute-value step in front of BA1 and the saturation are this
// design's choices.
module max_min_sel
  #(
  parameter int unsigned IN_W  = amb_pkg::IN_W,
  parameter int unsigned MAG_W = amb_pkg::MAG_W
) (
  input  logic signed [IN_W-1:0]  p,
  input  logic signed [IN_W-1:0]  q,
  output logic        [MAG_W-1:0] max_o,
  output logic        [MAG_W-1:0] min_o,
  output logic                    sel_o
);

  localparam logic [MAG_W-1:0] MAG_MAX = '1;

  logic [MAG_W-1:0] abs_p, abs_q;
  logic [IN_W-1:0]  diff;   // BA1

  // |x| limited to MAG_W bits
  function automatic logic [MAG_W-1:0] sat_abs(logic signed [IN_W-1:0] v);
    logic [IN_W-1:0] m;
    m = v[IN_W-1] ? IN_W'(-v) : IN_W'(v);
    if (m > IN_W'(MAG_MAX)) return MAG_MAX;
    return m[MAG_W-1:0];
  endfunction

  always_comb begin
    abs_p = sat_abs(p);
    abs_q = sat_abs(q);
    diff  = {{(IN_W-MAG_W){1'b0}}, abs_p} - {{(IN_W-MAG_W){1'b0}}, abs_q};
    sel_o = diff[IN_W-1];
    max_o = sel_o ? abs_q : abs_p;   // MUX1
    min_o = sel_o ? abs_p : abs_q;   // MUX2
  end

endmodule
