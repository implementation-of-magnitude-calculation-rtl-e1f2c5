// tb_ratio_mult -- self-checking test of MULT4 (r = y * R).
// Random reciprocal words and dividends plus corners; the expected quotient
// is floor(R*y / 2^11) limited to 255, worked out in 64-bit integers.
module tb_ratio_mult;
  logic [14:0] recip;
  logic [10:0] y;
  logic [7:0]  ratio;
  int checks = 0, failures = 0;
  int sat_seen = 0;

  ratio_mult dut (.recip_i(recip), .y_i(y), .ratio_o(ratio));

  task automatic check(int rv, int yv);
    longint e;
    recip = 15'(rv); y = 11'(yv);
    #1;
    e = (longint'(rv) * longint'(yv)) >>> 11;
    if (e > 255) begin e = 255; sat_seen++; end
    checks++;
    if (longint'(ratio) != e) begin
      failures++;
      if (failures < 10) $display("FAIL R=%0d y=%0d got %0d exp %0d", rv, yv, ratio, e);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(8192, 64);     // 1/64 * 64 = 1 -> limited to 255
    check(8192, 63);     // 63/64 -> 252
    check(0, 2047);
    check(32767, 2047);
    check(256, 2047);
    for (int n = 0; n < 20000; n++) check(int'($urandom_range(0, 8192)), int'(11'($urandom)));
    checks++;
    if (sat_seen == 0) begin failures++; $display("FAIL limit never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
