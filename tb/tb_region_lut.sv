// tb_region_lut -- self-checking test of LT5.
// All 256 quotients are applied.  The expected region is the number of
// sector boundaries tan(11.25 k deg), k = 1..3, that lie below r8/256,
// computed with $tan in the testbench.
module tb_region_lut;
  logic [7:0] ratio;
  logic [1:0] region;
  int checks = 0, failures = 0;
  int seen [4] = '{0, 0, 0, 0};

  region_lut dut (.ratio_i(ratio), .region_o(region));

  localparam real PI = 3.14159265358979;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    for (int i = 0; i < 256; i++) begin
      ratio = 8'(i);
      #1;
      e = 0;
      for (int k = 1; k <= 3; k++)
        if ($tan(k * 11.25 * PI / 180.0) * 256.0 < real'(i)) e++;
      checks++;
      seen[region]++;
      if (int'(region) != e) begin
        failures++;
        if (failures < 10) $display("FAIL r8=%0d got %0d exp %0d", i, region, e);
      end
    end
    $display("entries per region: %0d %0d %0d %0d", seen[0], seen[1], seen[2], seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
