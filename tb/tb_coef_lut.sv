// tb_coef_lut -- self-checking test of LT6/LT7.
// For each region the expected alpha and beta are (1+e)cos(phi) and
// (1+e)sin(phi), phi = 5.625 + 11.25 i degrees, e = (1-cos 5.625)/(1+cos 5.625),
// scaled by 2^11 and rounded; beta must also lie within 0.0005 of the
// published values 0.0983, 0.2910, 0.4725, 0.6359.
module tb_coef_lut;
  logic [1:0]  region;
  logic [10:0] alpha, beta;
  int checks = 0, failures = 0;

  coef_lut dut (.region_i(region), .alpha_o(alpha), .beta_o(beta));

  localparam real PI = 3.14159265358979;
  real pub_beta [4] = '{0.0983, 0.2910, 0.4725, 0.6359};

  task automatic expect_eq(string what, int i, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s[%0d] got %0d exp %0d", what, i, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real c0, e, phi, bv;
    c0 = $cos(5.625 * PI / 180.0);
    e  = (1.0 - c0) / (1.0 + c0);
    for (int i = 0; i < 4; i++) begin
      region = 2'(i);
      #1;
      phi = (5.625 + 11.25 * i) * PI / 180.0;
      expect_eq("alpha", i, int'(alpha), int'($floor((1.0 + e) * $cos(phi) * 2048.0 + 0.5)));
      expect_eq("beta",  i, int'(beta),  int'($floor((1.0 + e) * $sin(phi) * 2048.0 + 0.5)));
      bv = real'(beta) / 2048.0 - pub_beta[i];
      checks++;
      if (bv > 0.0005 || bv < -0.0005) begin
        failures++;
        $display("FAIL beta[%0d] = %f far from %f", i, real'(beta) / 2048.0, pub_beta[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
