// magnitude_calc -- magnitude of a complex sample, |P + jQ|, by the improved
// alpha-max-plus-beta-min method with four approximation regions.
//
// Data path (three stages, each ending in a register when PIPELINED = 1):
//   stage 1  max_min_sel: |P|, |Q|, BA1 and MUX1/MUX2 give Max and Min;
//            range_norm scales a Max below 64 (and Min with it) for the
//            reciprocal unit.
//   stage 2  recp: R ~ 1/Max from four tables, three multipliers and BA2;
//            ratio_mult (MULT4): r = Min * R as an 8-bit fraction.
//   stage 3  region_lut (LT5) chooses the region from r, coef_lut (LT6/LT7)
//            gives (alpha, beta) and mag_sum (MULT6, MULT7, BA3) forms
//            alpha*Max + beta*Min.
// With PIPELINED = 1 a sample presented with in_valid at a rising clock edge
// produces mag and out_valid three edges later; one sample may enter every
// clock.  With PIPELINED = 0 the path is combinational (out_valid = in_valid,
// clk and rst_n unused).  rst_n clears all pipeline registers asynchronously.
//
// Interface: p, q (12-bit two's complement) in; mag (12-bit unsigned),
// region (index of the region used) and out_valid out.  The data path, its
// widths and the three-stage pipeline follow the original design; the stage
// boundaries, the valid handshake, the reset and the normalisation of small
// divisors are this design's choices.
module magnitude_calc
  import amb_pkg::*;
#(
  parameter bit PIPELINED = 1'b1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] p,
  input  logic signed [IN_W-1:0] q,
  output logic                   out_valid,
  output logic [OUT_W-1:0]       mag,
  output logic [REG_W-1:0]       region
);

  typedef struct packed {
    logic       valid;
    logic [MAG_W-1:0] max_v;
    logic [MAG_W-1:0] min_v;
    logic [MAG_W-1:0] xn;      // normalised divisor
    logic [MAG_W-1:0] yn;      // normalised dividend
  } s1_t;

  typedef struct packed {
    logic       valid;
    logic [MAG_W-1:0] max_v;
    logic [MAG_W-1:0] min_v;
    ratio_t     ratio;
  } s2_t;

  typedef struct packed {
    logic       valid;
    out_t       mag;
    region_t    region;
  } s3_t;

  s1_t s1_d, s1_q;
  s2_t s2_d, s2_q;
  s3_t s3_d, s3_q;

  // ---------------- stage 1 ----------------
  logic sel_unused;

  max_min_sel u_maxmin (
    .p    (p),
    .q    (q),
    .max_o(s1_d.max_v),
    .min_o(s1_d.min_v),
    .sel_o(sel_unused)
  );

  range_norm u_norm (
    .x_i(s1_d.max_v),
    .y_i(s1_d.min_v),
    .x_o(s1_d.xn),
    .y_o(s1_d.yn)
  );

  assign s1_d.valid = in_valid;

  // ---------------- stage 2 ----------------
  recip_t recip;

  recp u_recp (
    .x_i(s1_q.xn),
    .r_o(recip)
  );

  ratio_mult u_mult4 (
    .recip_i(recip),
    .y_i    (s1_q.yn),
    .ratio_o(s2_d.ratio)
  );

  assign s2_d.valid = s1_q.valid;
  assign s2_d.max_v = s1_q.max_v;
  assign s2_d.min_v = s1_q.min_v;

  // ---------------- stage 3 ----------------
  coef_t alpha, beta;

  region_lut u_lt5 (
    .ratio_i (s2_q.ratio),
    .region_o(s3_d.region)
  );

  coef_lut u_lt67 (
    .region_i(s3_d.region),
    .alpha_o (alpha),
    .beta_o  (beta)
  );

  mag_sum u_sum (
    .max_i  (s2_q.max_v),
    .min_i  (s2_q.min_v),
    .alpha_i(alpha),
    .beta_i (beta),
    .mag_o  (s3_d.mag)
  );

  assign s3_d.valid = s2_q.valid;

  // ---------------- pipeline registers ----------------
  if (PIPELINED) begin : g_pipe
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        s1_q <= '0;
        s2_q <= '0;
        s3_q <= '0;
      end else begin
        s1_q <= s1_d;
        s2_q <= s2_d;
        s3_q <= s3_d;
      end
    end
  end else begin : g_comb
    assign s1_q = s1_d;
    assign s2_q = s2_d;
    assign s3_q = s3_d;
  end

  assign out_valid = s3_q.valid;
  assign mag       = s3_q.mag;
  assign region    = s3_q.region;

endmodule
