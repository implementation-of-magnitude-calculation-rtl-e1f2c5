// tb_recp -- self-checking test of the reciprocal unit.
// Sweeps every divisor x = 64..2047 and compares R (LSB 2^-19) with 1/x.
// The allowed absolute error is the reciprocal error bound of the method,
// 1.717e-4 for a_min = 64, plus three LSBs of word-length error; for
// x >= 1024 the relative error must also stay under 0.6 %.  A few exact
// points are checked as well: x = 64 gives 1/64, x = 128 gives 1/128.
module tb_recp;
  logic [10:0] x;
  logic [14:0] r;
  int checks = 0, failures = 0;

  recp dut (.x_i(x), .r_o(r));

  localparam real BOUND = 1.717e-4 + 3.0 / (2.0 ** 19);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real rv, err, worst;
    worst = 0.0;
    for (int i = 64; i < 2048; i++) begin
      x = 11'(i);
      #1;
      rv  = real'(r) / (2.0 ** 19);
      err = rv - 1.0 / i;
      if (err < 0) err = -err;
      if (err > worst) worst = err;
      checks++;
      if (err > BOUND || (i >= 1024 && err * i > 0.006)) begin
        failures++;
        if (failures < 10) $display("FAIL x=%0d R=%0d (%f) 1/x=%f", i, r, rv, 1.0 / i);
      end
    end
    x = 11'd64;  #1; checks++; if (r != 15'd8192) begin failures++; $display("FAIL x=64 R=%0d", r); end
    x = 11'd128; #1; checks++; if (r != 15'd4096) begin failures++; $display("FAIL x=128 R=%0d", r); end
    $display("worst absolute reciprocal error %e", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
