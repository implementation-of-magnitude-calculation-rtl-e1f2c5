// tb_magnitude_calc -- end-to-end test of the magnitude calculator.
//
// Two instances run side by side on the same stimulus: the default
// three-stage pipeline and a combinational one (PIPELINED = 0).  Samples are
// streamed with random idle cycles.  For every result the testbench checks
//   * latency: the pipelined result appears exactly 3 clocks after its input,
//   * the two instances agree bit for bit,
//   * accuracy: |mag - sqrt(P^2+Q^2)| <= 0.26 % of the true value + 1.5
//     (0.24 % approximation error, a small division/word-length margin and
//     the rounding of the two products),
//   * the region is the angular sector of (Max, Min) or a neighbour of it.
// It also counts how often each mechanism of the design occurred (every
// region, swapped operands, the -2048 limit, normalisation of a small Max,
// the quotient limit at Min = Max, a neighbour-region choice, idle cycles)
// and counts a failure for any that never happened.
module tb_magnitude_calc;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [11:0] p = '0, q = '0;
  logic        ov_p, ov_c;
  logic [11:0] mag_p, mag_c;
  logic [1:0]  reg_p, reg_c;
  int checks = 0, failures = 0;
  int cycle = 0;

  magnitude_calc dut_pipe (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .p(p), .q(q),
                           .out_valid(ov_p), .mag(mag_p), .region(reg_p));
  magnitude_calc #(.PIPELINED(1'b0)) dut_comb (
                           .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .p(p), .q(q),
                           .out_valid(ov_c), .mag(mag_c), .region(reg_c));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct {
    int pv, qv, at;
    logic [11:0] cmag;
    logic [1:0]  creg;
  } item_t;
  item_t fifo [$];

  localparam real PI = 3.14159265358979;
  typedef enum int {M_REG0, M_REG1, M_REG2, M_REG3, M_SWAP, M_SAT, M_NORM, M_EQUAL,
                    M_NEIGHBOUR, M_IDLE, M_N} mech_e;
  int seen [M_N];
  string mname [M_N] = '{"region0", "region1", "region2", "region3", "swap", "limit_-2048",
                         "normalise", "min_eq_max", "neighbour_region", "idle_cycle"};

  function automatic int iabs(int v);
    int m;
    m = (v < 0) ? -v : v;
    return (m > 2047) ? 2047 : m;
  endfunction

  task automatic fail(string msg);
    failures++;
    if (failures < 15) $display("FAIL @%0d %s", cycle, msg);
  endtask

  // score one result
  task automatic score(item_t it, logic [11:0] m, logic [1:0] r);
    int ap, aq, mx, mn, ideal;
    real t, err;
    ap = iabs(it.pv); aq = iabs(it.qv);
    mx = (ap >= aq) ? ap : aq;
    mn = (ap >= aq) ? aq : ap;
    t  = $sqrt(real'(mx) * mx + real'(mn) * mn);
    err = real'(m) - t;
    if (err < 0) err = -err;
    checks++;
    if (err > 0.0026 * t + 1.5)
      fail($sformatf("P=%0d Q=%0d mag=%0d true=%f", it.pv, it.qv, m, t));
    checks++;
    if (m != it.cmag || r != it.creg)
      fail($sformatf("pipelined %0d/%0d differs from combinational %0d/%0d", m, r, it.cmag, it.creg));
    if (mx > 0) begin
      ideal = int'($floor($atan2(real'(mn), real'(mx)) * 180.0 / PI / 11.25));
      if (ideal > 3) ideal = 3;
      checks++;
      if (int'(r) != ideal && int'(r) != ideal + 1 && int'(r) != ideal - 1)
        fail($sformatf("P=%0d Q=%0d region %0d, sector %0d", it.pv, it.qv, r, ideal));
      if (int'(r) != ideal) seen[M_NEIGHBOUR]++;
    end
    seen[int'(r)]++;
    if (aq > ap) seen[M_SWAP]++;
    if (it.pv == -2048 || it.qv == -2048) seen[M_SAT]++;
    if (mx > 0 && mx < 64) seen[M_NORM]++;
    if (mx > 0 && mx == mn) seen[M_EQUAL]++;
  endtask

  // output monitor
  always @(posedge clk) begin
    if (rst_n && ov_p) begin
      item_t it;
      checks++;
      if (fifo.size() == 0) fail("result without input");
      else begin
        it = fifo.pop_front();
        checks++;
        if (cycle - it.at != 3) fail($sformatf("latency %0d, expected 3", cycle - it.at));
        score(it, mag_p, reg_p);
      end
    end
  end

  task automatic send(int pv, int qv);
    item_t it;
    p = 12'(pv); q = 12'(qv); in_valid = 1'b1;
    #1;
    checks++;
    if (!ov_c) fail("combinational out_valid low");
    it.pv = pv; it.qv = qv; it.at = cycle; it.cmag = mag_c; it.creg = reg_c;
    @(posedge clk);
    fifo.push_back(it);
    #1 in_valid = 1'b0;
    if ($urandom_range(0, 7) == 0) begin
      seen[M_IDLE]++;
      @(posedge clk); #1;
    end
  endtask

  initial begin
    #20000000;
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (ov_p) fail("out_valid during reset");
    rst_n = 1'b1;
    // directed corners
    send(0, 0);
    send(-2048, -2048);
    send(2047, -2048);
    send(1, 0);
    send(0, -1);
    send(5, 3);
    send(-40, 63);
    send(1000, 1000);
    send(-1234, 567);
    send(17, -2000);
    // angle sweep at several radii, with boundaries of every sector
    for (int rad = 100; rad <= 2000; rad += 300)
      for (int k = 0; k < 90; k++)
        send(int'($floor(rad * $cos(k * PI / 180.0 * 4.0))),
             int'($floor(rad * $sin(k * PI / 180.0 * 4.0))));
    // random samples, mixed small and large
    for (n = 0; n < 4000; n++) begin
      if (n % 4 == 0) send(int'($signed(7'($urandom))), int'($signed(7'($urandom))));
      else            send(int'($signed(12'($urandom))), int'($signed(12'($urandom))));
    end
    repeat (5) @(posedge clk);
    checks++;
    if (fifo.size() != 0) fail($sformatf("%0d results missing", fifo.size()));
    for (int i = 0; i < M_N; i++) begin
      $display("mechanism %-16s seen %0d times", mname[i], seen[i]);
      checks++;
      if (seen[i] == 0) fail($sformatf("mechanism %s never exercised", mname[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
