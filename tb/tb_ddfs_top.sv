// tb_ddfs_top: end-to-end self-checking test of the ROM-less quadrature DDFS
// at its default parameters (16-bit words, 16-bit control word).
//
// A cycle-accurate reference model runs the recursion
//   s' = s + round(fctrl*c / 2^16),  c' = c - round(fctrl*s / 2^16)
// in floating point (exact at these widths) and every output sample is
// compared with it. On top of that the test checks:
//   * reset:        sin = 0 and cos = 16384 (1.0) immediately, without a clock;
//   * accuracy:     over a quarter period, for control words 109, 117, 120 and
//                   256, the outputs stay within 6e-3 of the ideal sine and
//                   cosine of k*theta;
//   * frequency:    the cosine crosses zero within 1% of the ideal quarter
//                   period pi/2/theta cycles after reset (one sample per clock);
//   * switching:    the control word changes on the fly (as in a frequency
//                   hop) and the next sample continues from the current state,
//                   with no jump in phase;
//   * hold:         fctrl = 0 keeps the outputs constant;
//   * random FCW:   5000 cycles with a new random control word every cycle.
// Each of these is counted, and one that never happened counts as a failure.
module tb_ddfs_top;
  import ddfs_pkg::*;

  localparam real PI = 3.14159265358979323846;
  localparam real ERR_BOUND = 6.0e-3;

  logic    clk = 1'b0;
  logic    rst_n = 1'b1;
  fcw_t    fctrl = '0;
  sample_t sin_o, cos_o;

  int checks = 0;
  int failures = 0;
  int n_reset = 0, n_accuracy = 0, n_crossing = 0, n_switch = 0, n_hold = 0, n_random = 0;

  // Reference state.
  int ref_s, ref_c;

  ddfs_top dut (.clk(clk), .rst_n(rst_n), .fctrl_i(fctrl), .sin_o(sin_o), .cos_o(cos_o));

  always #5 clk = ~clk;

  function automatic int wrap16(int v);
    return ((v + 32768) & 32'hFFFF) - 32768;
  endfunction

  function automatic int theta_mul(int v, int f);
    return int'($floor(real'(v) * real'(f) / 65536.0 + 0.5));
  endfunction

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  task automatic check_ref(string what);
    checks++;
    if (int'(sin_o) != ref_s || int'(cos_o) != ref_c)
      fail($sformatf("%s: got sin=%0d cos=%0d expected sin=%0d cos=%0d", what, sin_o, cos_o, ref_s, ref_c));
  endtask

  // One clock with control word f: applied at the falling edge, result
  // checked just after the rising edge.
  task automatic step(int f, string what);
    int ns, nc;
    @(negedge clk) fctrl = fcw_t'(f);
    ns = wrap16(ref_s + theta_mul(ref_c, f));
    nc = wrap16(ref_c - theta_mul(ref_s, f));
    @(posedge clk);
    #1;
    ref_s = ns;
    ref_c = nc;
    check_ref(what);
  endtask

  // Reset between clock edges; fctrl is 0 on the edge after the release, so
  // that edge holds the start values.
  task automatic do_reset();
    @(negedge clk) fctrl = '0;
    #2 rst_n = 1'b0;
    #1;
    ref_s = 0;
    ref_c = 16384;
    checks++;
    if (sin_o !== 16'sd0 || cos_o !== 16'sd16384)
      fail($sformatf("reset: sin=%0d cos=%0d", sin_o, cos_o));
    else
      n_reset++;
    @(negedge clk) rst_n = 1'b1;
  endtask

  // Quarter period at a fixed control word: accuracy against the ideal
  // functions and the position of the cosine zero crossing.
  task automatic quarter_wave(int f);
    real theta, es, ec, worst;
    int  n, crossed_at;
    theta = real'(f) / 65536.0;
    n = int'($floor(PI / 2.0 / theta));
    worst = 0.0;
    crossed_at = -1;
    do_reset();
    for (int k = 1; k <= n + n / 50 + 2; k++) begin
      step(f, $sformatf("quarter wave fctrl=%0d k=%0d", f, k));
      if (crossed_at < 0 && cos_o <= 0) crossed_at = k;
      if (k <= n) begin
        es = real'(sin_o) / 16384.0 - $sin(real'(k) * theta);
        ec = real'(cos_o) / 16384.0 - $cos(real'(k) * theta);
        if (es < 0) es = -es;
        if (ec < 0) ec = -ec;
        if (es > worst) worst = es;
        if (ec > worst) worst = ec;
      end
    end
    checks++;
    if (worst > ERR_BOUND) fail($sformatf("fctrl=%0d worst error %f over %0d samples", f, worst, n));
    else n_accuracy++;
    $display("fctrl=%0d: quarter period %0d samples, worst error vs ideal %f, cosine zero crossing at cycle %0d",
             f, n, worst, crossed_at);
    checks++;
    if (crossed_at < 0 || real'(crossed_at) < 0.99 * PI / 2.0 / theta ||
        real'(crossed_at) > 1.01 * PI / 2.0 / theta + 1.0)
      fail($sformatf("fctrl=%0d cosine zero crossing at cycle %0d, ideal %f", f, crossed_at, PI / 2.0 / theta));
    else n_crossing++;
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int hops[5] = '{4, 2, 15, 26, 4};
    int prev_s, prev_c;
    rst_n = 1'b0;
    #3;
    rst_n = 1'b1;

    // Accuracy over a quarter period.
    quarter_wave(109);
    quarter_wave(117);
    quarter_wave(120);
    quarter_wave(256);

    // On-the-fly frequency changes with 16x larger words (faster hops).
    do_reset();
    foreach (hops[i]) begin
      for (int k = 0; k < 400; k++) step(hops[i] * 16, "frequency hop");
      n_switch++;
    end

    // fctrl = 0 holds the current sample pair.
    prev_s = ref_s;
    prev_c = ref_c;
    for (int k = 0; k < 50; k++) begin
      step(0, "hold");
      checks++;
      if (int'(sin_o) != prev_s || int'(cos_o) != prev_c) fail("hold: output moved with fctrl = 0");
      else n_hold++;
    end

    // Random control word every cycle.
    do_reset();
    for (int k = 0; k < 5000; k++) begin
      step(int'($urandom_range(65535)), "random fctrl");
      n_random++;
    end

    $display("events: reset=%0d accuracy=%0d crossing=%0d switch=%0d hold=%0d random=%0d",
             n_reset, n_accuracy, n_crossing, n_switch, n_hold, n_random);
    checks++;
    if (n_reset == 0 || n_accuracy == 0 || n_crossing == 0 || n_switch == 0 || n_hold == 0 || n_random == 0)
      fail("a mechanism was never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
