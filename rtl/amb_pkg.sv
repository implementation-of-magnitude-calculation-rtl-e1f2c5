// amb_pkg -- shared word widths, constants and table generators of the
// improved alpha-max-plus-beta-min magnitude calculator.
//
// The calculator estimates |P + jQ| as alpha_i*x + beta_i*y, x = max(|P|,|Q|),
// y = min(|P|,|Q|), with the coefficient pair (alpha_i, beta_i) chosen from the
// quotient r = y/x.  The quotient is formed without a divider: the reciprocal
// of x is built from look-up tables addressed by the upper segment a and the
// lower segment b of x (x = a + b) as
//
//     1/x ~ 1/a - b/(a(a+K1)) - b(K1-b)/(a(a+K1)(a+K2))
//
// with the constants K1 = 27.959 and K2 = 63 of the original method.  This
// package holds the word widths, those constants in fixed point and the integer
// functions that fill the tables at elaboration time, so that every table is
// given by its formula rather than by a list of numbers.
//
// Fixed-point formats (LSB weights):
//   LT1 = 1/a                    14 bits unsigned, LSB 2^-19
//   LT2 = 1/(a(a+K1))            14 bits unsigned, LSB 2^-25
//   LT3 = 1/(a(a+K1)(a+K2))      14 bits unsigned, LSB 2^-33
//   LT4 = K1 - b                 14 bits signed,   LSB 2^-7
//   reciprocal R                 15 bits unsigned, LSB 2^-19
//   quotient r                    8 bits unsigned, LSB 2^-8
//   alpha, beta                  11 bits unsigned, LSB 2^-11
// The 5-bit/6-bit split of the 11-bit divisor, K1, K2, the 14-bit table words
// and the 8/11/12-bit widths of the later stages follow the original design;
// the LSB weights and the rounding are this implementation's choices.
//
// Coefficients: the four regions split the angle range 0..45 degrees into
// equal 11.25-degree sectors; in sector i (centre phi_i) the equiripple pair is
// alpha_i = (1+e)cos(phi_i), beta_i = (1+e)sin(phi_i) with
// e = (1-cos(5.625 deg))/(1+cos(5.625 deg)) = 0.24 %.  Region boundaries are
// tan(11.25 deg), tan(22.5 deg), tan(33.75 deg).  The beta values reproduce the
// published 0.0983, 0.2910, 0.4725, 0.6359; the alphas and boundaries are
// derived from the same construction.
package amb_pkg;

  // ---- word widths ------------------------------------------------------
  localparam int unsigned IN_W    = 12;  // two's complement P, Q
  localparam int unsigned MAG_W   = 11;  // |P|, |Q|, Max, Min
  localparam int unsigned A_W     = 5;   // upper segment a = x[10:6]
  localparam int unsigned B_W     = 6;   // lower segment b = x[5:0]
  localparam int unsigned LUT_W   = 14;  // LT1..LT4 words
  localparam int unsigned R_W     = 15;  // BA2 output (reciprocal)
  localparam int unsigned RATIO_W = 8;   // MULT4 output r
  localparam int unsigned COEF_W  = 11;  // alpha, beta
  localparam int unsigned OUT_W   = 12;  // BA3 output (magnitude)
  localparam int unsigned REGIONS = 4;
  localparam int unsigned REG_W   = $clog2(REGIONS);

  // ---- fixed-point positions (fraction bits) -----------------------------
  localparam int unsigned LT1_F = 19;
  localparam int unsigned LT2_F = 25;
  localparam int unsigned LT3_F = 33;
  localparam int unsigned LT4_F = 7;
  localparam int unsigned R_F   = 19;   // reciprocal word
  localparam int unsigned SUM_F = 24;   // BA2 internal alignment

  // ---- algorithm constants ------------------------------------------------
  localparam int unsigned K1_Q7 = 3579;  // K1 = 27.959 -> round(27.959 * 128)
  localparam int unsigned K2    = 63;    // K2 = b_k = 2^B_W - 1

  typedef logic [MAG_W-1:0]   mag_t;
  typedef logic [LUT_W-1:0]   lut_t;
  typedef logic [R_W-1:0]     recip_t;
  typedef logic [RATIO_W-1:0] ratio_t;
  typedef logic [COEF_W-1:0]  coef_t;
  typedef logic [REG_W-1:0]   region_t;
  typedef logic [OUT_W-1:0]   out_t;

  // round(num / den) for non-negative integers
  function automatic longint unsigned div_round(longint unsigned num,
                                                longint unsigned den);
    return (num + den / 2) / den;
  endfunction

  // LT1[A] = 1/a, a = A * 2^B_W, LSB 2^-LT1_F
  function automatic lut_t lt1_value(int unsigned idx);
    longint unsigned a;
    a = longint'(idx) << B_W;
    if (idx == 0) return '0;
    return lut_t'(div_round(64'd1 << LT1_F, a));
  endfunction

  // LT2[A] = 1/(a(a+K1)), LSB 2^-LT2_F; K1 carries 7 fraction bits
  function automatic lut_t lt2_value(int unsigned idx);
    longint unsigned a;
    a = longint'(idx) << B_W;
    if (idx == 0) return '0;
    return lut_t'(div_round(64'd1 << (LT2_F + 7), a * ((a << 7) + longint'(K1_Q7))));
  endfunction

  // LT3[A] = 1/(a(a+K1)(a+K2)), LSB 2^-LT3_F
  function automatic lut_t lt3_value(int unsigned idx);
    longint unsigned a;
    a = longint'(idx) << B_W;
    if (idx == 0) return '0;
    return lut_t'(div_round(64'd1 << (LT3_F + 7),
                            a * ((a << 7) + longint'(K1_Q7)) * (a + longint'(K2))));
  endfunction

  // LT4[b] = K1 - b, signed, LSB 2^-LT4_F
  function automatic lut_t lt4_value(int unsigned b);
    return lut_t'(int'(K1_Q7) - (int'(b) << LT4_F));
  endfunction

  // alpha_i, beta_i as round(value * 2^11)
  localparam coef_t ALPHA [REGIONS] = '{11'd2043, 11'd1965, 11'd1811, 11'd1587};
  localparam coef_t BETA  [REGIONS] = '{11'd201,  11'd596,  11'd968,  11'd1302};

  // Upper end of regions 0..2 in units of 2^-8: floor(tan(11.25 deg * k) * 256)
  // = floor(50.92), floor(106.04), floor(171.05).  Region k holds r8 up to and
  // including RBOUND[k]; everything above RBOUND[2] is region 3.
  localparam ratio_t RBOUND [REGIONS-1] = '{8'd50, 8'd106, 8'd171};

  // LT5 contents: region index of an 8-bit quotient
  function automatic region_t region_value(int unsigned r8);
    region_t reg_idx;
    reg_idx = region_t'(REGIONS - 1);
    for (int k = REGIONS - 2; k >= 0; k--)
      if (r8 <= int'(RBOUND[k])) reg_idx = region_t'(k);
    return reg_idx;
  endfunction

endpackage
