// tb_max_min_sel -- self-checking test of the BA1/MUX1/MUX2 stage.
// Drives corner values (0, +-1, 2047, -2048, equal magnitudes) and 20000
// random pairs; the expected Max, Min and select bit are computed from
// integer absolute values in the testbench.  A watchdog ends a stuck run.
module tb_max_min_sel;
  logic signed [11:0] p, q;
  logic [10:0] max_o, min_o;
  logic        sel_o;
  int checks = 0, failures = 0;

  max_min_sel dut (.p(p), .q(q), .max_o(max_o), .min_o(min_o), .sel_o(sel_o));

  function automatic int iabs(int v);
    int m;
    m = (v < 0) ? -v : v;
    return (m > 2047) ? 2047 : m;
  endfunction

  task automatic check(int pv, int qv);
    int ap, aq, emax, emin;
    p = 12'(pv); q = 12'(qv);
    #1;
    ap = iabs(pv); aq = iabs(qv);
    emax = (ap >= aq) ? ap : aq;
    emin = (ap >= aq) ? aq : ap;
    checks++;
    if (int'(max_o) != emax || int'(min_o) != emin || sel_o != (ap < aq)) begin
      failures++;
      if (failures < 10)
        $display("FAIL p=%0d q=%0d got max=%0d min=%0d sel=%0b exp %0d %0d %0b",
                 pv, qv, max_o, min_o, sel_o, emax, emin, ap < aq);
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
    automatic int corner [8] = '{0, 1, -1, 2047, -2047, -2048, 1000, -1000};
    foreach (corner[i]) foreach (corner[j]) check(corner[i], corner[j]);
    for (int n = 0; n < 20000; n++)
      check(int'($signed(12'($urandom))), int'($signed(12'($urandom))));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
