// tb_ddfs_mult: self-checking test of the theta multiplier.
//
// Two instances are tested side by side, one rounding to nearest and one
// truncating. Each vector's expected value is worked out in floating point,
// theta * sample = sample * fctrl / 2^16, then floor(x + 0.5) or floor(x)
// and wrapped to 16 bits. Corner values (zero, +-1.0, the extreme samples and
// control words) come first, then random vectors.
module tb_ddfs_mult;
  import ddfs_pkg::*;

  sample_t sample;
  fcw_t    fctrl;
  sample_t prod_rnd, prod_trn;

  int checks = 0;
  int failures = 0;

  ddfs_mult #(.ROUND(1'b1)) dut_rnd (.sample_i(sample), .fctrl_i(fctrl), .product_o(prod_rnd));
  ddfs_mult #(.ROUND(1'b0)) dut_trn (.sample_i(sample), .fctrl_i(fctrl), .product_o(prod_trn));

  function automatic sample_t wrap16(real x);
    longint v = longint'(x);
    return sample_t'(v[15:0]);
  endfunction

  task automatic check_one(int s, int f);
    real x;
    sample_t exp_rnd, exp_trn;
    sample = sample_t'(s);
    fctrl  = fcw_t'(f);
    #1;
    x = real'(sample) * real'(fctrl) / 65536.0;
    exp_rnd = wrap16($floor(x + 0.5));
    exp_trn = wrap16($floor(x));
    checks += 2;
    if (prod_rnd !== exp_rnd) begin
      failures++;
      $display("FAIL round: sample=%0d fctrl=%0d got %0d expected %0d", sample, fctrl, prod_rnd, exp_rnd);
    end
    if (prod_trn !== exp_trn) begin
      failures++;
      $display("FAIL trunc: sample=%0d fctrl=%0d got %0d expected %0d", sample, fctrl, prod_trn, exp_trn);
    end
  endtask

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int corner_s[7] = '{0, 16384, -16384, 32767, -32768, 1, -1};
    static int corner_f[6] = '{0, 1, 512, 32768, 65535, 109};
    foreach (corner_s[i])
      foreach (corner_f[j])
        check_one(corner_s[i], corner_f[j]);
    repeat (20000) check_one(int'($urandom_range(65535)) - 32768, int'($urandom_range(65535)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
