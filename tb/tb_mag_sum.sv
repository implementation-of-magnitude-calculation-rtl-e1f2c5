// tb_mag_sum -- self-checking test of MULT6/MULT7/BA3.
// Random and extreme operands; the expected value is
// round(x*alpha/2^11) + round(y*beta/2^11) computed in testbench integers.
module tb_mag_sum;
  logic [10:0] mx, mn, alpha, beta;
  logic [11:0] mag;
  int checks = 0, failures = 0;

  mag_sum dut (.max_i(mx), .min_i(mn), .alpha_i(alpha), .beta_i(beta), .mag_o(mag));

  task automatic check(int x, int y, int a, int b);
    int e;
    mx = 11'(x); mn = 11'(y); alpha = 11'(a); beta = 11'(b);
    #1;
    e = (x * a + 1024) / 2048 + (y * b + 1024) / 2048;
    checks++;
    if (int'(mag) != e) begin
      failures++;
      if (failures < 10) $display("FAIL x=%0d y=%0d a=%0d b=%0d got %0d exp %0d", x, y, a, b, mag, e);
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
    int x, y;
    check(2047, 2047, 1587, 1302);
    check(2047, 0, 2043, 201);
    check(0, 0, 2043, 201);
    check(1000, 1000, 1024, 1024);   // 500 + 500
    check(3, 1, 1024, 1024);         // 1.5 -> 2, 0.5 -> 1
    for (int n = 0; n < 20000; n++) begin
      x = int'(11'($urandom));
      y = int'($urandom_range(0, x));
      check(x, y, int'($urandom_range(1024, 2047)), int'($urandom_range(0, 1400)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
