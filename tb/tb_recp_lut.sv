// tb_recp_lut -- self-checking test of the reciprocal look-up tables.
// Every address is read.  The expected words are computed in real arithmetic
// from the formulas 1/a, 1/(a(a+K1)), 1/(a(a+K1)(a+K2)) and K1 - b with
// a = 64A, K1 = 3579/128 (the stored constant) and K2 = 63, scaled by 2^19,
// 2^25, 2^33 and 2^7 and rounded to nearest.
module tb_recp_lut;
  logic [4:0]  a;
  logic [5:0]  b;
  logic [13:0] lt1, lt2, lt3, lt4;
  int checks = 0, failures = 0;

  recp_lut dut (.a_i(a), .b_i(b), .lt1_o(lt1), .lt2_o(lt2), .lt3_o(lt3), .lt4_o(lt4));

  localparam real K1 = 3579.0 / 128.0;

  function automatic int rnd(real v);
    return int'($floor(v + 0.5));
  endfunction

  task automatic expect_eq(string what, int idx, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s[%0d] got %0d exp %0d", what, idx, got, exp);
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
    real av;
    b = '0;
    for (int i = 1; i < 32; i++) begin
      a = 5'(i);
      #1;
      av = 64.0 * i;
      expect_eq("LT1", i, int'(lt1), rnd((2.0 ** 19) / av));
      expect_eq("LT2", i, int'(lt2), rnd((2.0 ** 25) / (av * (av + K1))));
      expect_eq("LT3", i, int'(lt3), rnd((2.0 ** 33) / (av * (av + K1) * (av + 63.0))));
    end
    for (int j = 0; j < 64; j++) begin
      b = 6'(j);
      #1;
      expect_eq("LT4", j, int'($signed(lt4)), rnd((K1 - j) * 128.0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
