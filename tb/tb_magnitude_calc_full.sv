// tb_magnitude_calc_full -- full-range accuracy run of the magnitude
// calculator with its default parameters (12-bit inputs, four regions,
// three-stage pipeline).
//
// Streams a grid of (P, Q) pairs covering the whole 12-bit two's complement
// plane (steps of 17 and 19, about 52,000 samples, one per clock) and checks
// every result against sqrt(P^2+Q^2): the error may not exceed 0.26 % of the
// true value + 1.5.  It reports the worst relative error over results of
// 1024 or more, where the fixed word lengths matter least, and requires it
// to stay below 0.36 %.  Results must arrive three clocks after their inputs
// and in order.
module tb_magnitude_calc_full;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [11:0] p = '0, q = '0;
  logic        out_valid;
  logic [11:0] mag;
  logic [1:0]  region;
  int checks = 0, failures = 0;
  int cycle = 0;
  real worst_rel = 0.0;
  int  samples = 0;

  magnitude_calc dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .p(p), .q(q),
                      .out_valid(out_valid), .mag(mag), .region(region));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { int pv, qv, at; } item_t;
  item_t fifo [$];

  function automatic int iabs(int v);
    int m;
    m = (v < 0) ? -v : v;
    return (m > 2047) ? 2047 : m;
  endfunction

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      item_t it;
      real t, err;
      int ap, aq;
      checks++;
      if (fifo.size() == 0) begin
        failures++;
        $display("FAIL result without input");
      end else begin
        it = fifo.pop_front();
        ap = iabs(it.pv); aq = iabs(it.qv);
        t = $sqrt(real'(ap) * ap + real'(aq) * aq);
        err = real'(mag) - t;
        if (err < 0) err = -err;
        if (cycle - it.at != 3 || err > 0.0026 * t + 1.5) begin
          failures++;
          if (failures < 10)
            $display("FAIL P=%0d Q=%0d mag=%0d true=%f latency=%0d", it.pv, it.qv, mag, t,
                     cycle - it.at);
        end
        if (t >= 1024.0 && err / t > worst_rel) worst_rel = err / t;
        samples++;
      end
    end
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    item_t it;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int pv = -2048; pv < 2048; pv += 17)
      for (int qv = -2048; qv < 2048; qv += 19) begin
        p = 12'(pv); q = 12'(qv); in_valid = 1'b1;
        it.pv = pv; it.qv = qv; it.at = cycle;
        @(posedge clk);
        fifo.push_back(it);
        #1;
      end
    in_valid = 1'b0;
    repeat (5) @(posedge clk);
    checks++;
    if (fifo.size() != 0) begin failures++; $display("FAIL %0d results missing", fifo.size()); end
    checks++;
    if (worst_rel > 0.0036) begin failures++; $display("FAIL worst relative error too large"); end
    $display("%0d samples, worst relative error for |z| >= 1024: %.4f %%", samples, worst_rel * 100.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
