// tb_ddfs_sfdr: spectral test of the ROM-less quadrature DDFS over a sweep of
// frequency control words.
//
// For each control word the synthesizer is reset and NPTS consecutive output
// pairs are recorded as the complex signal cos + j*sin. The record is
// multiplied by a 4-term Blackman-Harris window,
//   w[k] = 0.35875 - 0.48829 cos(2 pi k/N) + 0.14128 cos(4 pi k/N)
//          - 0.01168 cos(6 pi k/N),
// and transformed with an in-place radix-2 FFT. Since the signal is complex,
// the tone shows as a single peak at bin N * theta / (2 pi), theta =
// fctrl / 2^16. The test checks that the peak lies within one bin of that
// position (the output frequency is right) and reports the spurious-free
// dynamic range: the peak over the largest bin outside +-8 bins of it. The
// SFDR is checked against a 45 dB floor, a sanity bound of this test, far
// below what a perfect oscillator would reach; it catches a broken datapath,
// not a small loss of purity.
//
// Control words that give fewer than three periods in the record, or that
// drive the slowly growing amplitude past full scale within it, are run but
// only reported.
module tb_ddfs_sfdr;
  import ddfs_pkg::*;

  localparam int  LOG2N = 16;
  localparam int  NPTS  = 1 << LOG2N;
  localparam real PI    = 3.14159265358979323846;
  localparam real SFDR_FLOOR_DB = 45.0;

  logic    clk = 1'b0;
  logic    rst_n = 1'b0;
  fcw_t    fctrl = '0;
  sample_t sin_o, cos_o;

  int checks = 0;
  int failures = 0;
  int n_measured = 0;

  real re[NPTS];
  real im[NPTS];

  ddfs_top dut (.clk(clk), .rst_n(rst_n), .fctrl_i(fctrl), .sin_o(sin_o), .cos_o(cos_o));

  always #5 clk = ~clk;

  function automatic int bitrev(int v);
    int r = 0;
    for (int i = 0; i < LOG2N; i++) r |= ((v >> i) & 1) << (LOG2N - 1 - i);
    return r;
  endfunction

  task automatic fft();
    real tr, ti, wr, wi, ur, ui;
    int  half, j;
    for (int i = 0; i < NPTS; i++) begin
      j = bitrev(i);
      if (j > i) begin
        tr = re[i]; re[i] = re[j]; re[j] = tr;
        ti = im[i]; im[i] = im[j]; im[j] = ti;
      end
    end
    for (int len = 2; len <= NPTS; len *= 2) begin
      half = len / 2;
      for (int k = 0; k < half; k++) begin
        wr = $cos(-2.0 * PI * real'(k) / real'(len));
        wi = $sin(-2.0 * PI * real'(k) / real'(len));
        for (int b = 0; b < NPTS; b += len) begin
          ur = re[b + k];
          ui = im[b + k];
          tr = re[b + k + half] * wr - im[b + k + half] * wi;
          ti = re[b + k + half] * wi + im[b + k + half] * wr;
          re[b + k] = ur + tr;
          im[b + k] = ui + ti;
          re[b + k + half] = ur - tr;
          im[b + k + half] = ui - ti;
        end
      end
    end
  endtask

  task automatic measure(int f);
    real theta, expected_bin, w, mag, peak, spur, sfdr, x, periods;
    int  peak_bin, bin_dist;
    bit  in_range;
    theta = real'(f) / 65536.0;
    expected_bin = real'(NPTS) * theta / (2.0 * PI);
    periods = expected_bin;
    // Reset, then record one sample per clock.
    @(negedge clk);
    rst_n = 1'b0;
    fctrl = fcw_t'(f);
    @(negedge clk);
    rst_n = 1'b1;
    in_range = 1'b1;
    for (int k = 0; k < NPTS; k++) begin
      x = 2.0 * PI * real'(k) / real'(NPTS);
      w = 0.35875 - 0.48829 * $cos(x) + 0.14128 * $cos(2.0 * x) - 0.01168 * $cos(3.0 * x);
      re[k] = w * real'(cos_o) / 16384.0;
      im[k] = w * real'(sin_o) / 16384.0;
      if (cos_o > 16'sd29000 || cos_o < -16'sd29000 || sin_o > 16'sd29000 || sin_o < -16'sd29000)
        in_range = 1'b0;
      @(negedge clk);
    end
    fft();
    peak = 0.0;
    peak_bin = 0;
    for (int k = 0; k < NPTS; k++) begin
      mag = re[k] * re[k] + im[k] * im[k];
      if (mag > peak) begin
        peak = mag;
        peak_bin = k;
      end
    end
    spur = 1.0e-300;
    for (int k = 0; k < NPTS; k++) begin
      bin_dist = k - peak_bin;
      if (bin_dist < 0) bin_dist = -bin_dist;
      if (bin_dist > NPTS / 2) bin_dist = NPTS - bin_dist;
      mag = re[k] * re[k] + im[k] * im[k];
      if (bin_dist > 8 && mag > spur) spur = mag;
    end
    sfdr = 10.0 * $log10(peak / spur);
    $display("fctrl=%0d: %0.1f periods in %0d samples, peak bin %0d (expected %0.1f), SFDR %0.1f dB%s",
             f, periods, NPTS, peak_bin, expected_bin, sfdr,
             in_range ? "" : ", amplitude left the range within the record");
    if (periods >= 3.0 && in_range) begin
      checks++;
      if (real'(peak_bin) < expected_bin - 1.0 || real'(peak_bin) > expected_bin + 1.0) begin
        failures++;
        $display("FAIL fctrl=%0d: peak at bin %0d, expected %0.1f", f, peak_bin, expected_bin);
      end
      checks++;
      if (sfdr < SFDR_FLOOR_DB) begin
        failures++;
        $display("FAIL fctrl=%0d: SFDR %0.1f dB below %0.1f dB", f, sfdr, SFDR_FLOOR_DB);
      end
      n_measured++;
    end
  endtask

  initial begin : watchdog
    repeat (20 * (NPTS + 10)) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int sweep[12] = '{4, 10, 12, 22, 41, 46, 55, 109, 117, 120, 256, 512};
    foreach (sweep[i]) measure(sweep[i]);
    checks++;
    if (n_measured == 0) begin
      failures++;
      $display("FAIL no control word could be measured");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
