// tb_ddfs_addsub: self-checking test of the channel adder.
//
// One instance adds (sine channel), one subtracts (cosine channel). The
// expected result is computed with 32-bit integers and wrapped to 16 bits.
// Directed cases cover both overflow directions, then random operands.
module tb_ddfs_addsub;
  import ddfs_pkg::*;

  sample_t a, b, sum, diff;
  int checks = 0;
  int failures = 0;

  ddfs_addsub #(.SUBTRACT(1'b0)) dut_add (.a_i(a), .b_i(b), .sum_o(sum));
  ddfs_addsub #(.SUBTRACT(1'b1)) dut_sub (.a_i(a), .b_i(b), .sum_o(diff));

  task automatic check_one(int x, int y);
    int es, ed;
    a = sample_t'(x);
    b = sample_t'(y);
    #1;
    es = int'(a) + int'(b);
    ed = int'(a) - int'(b);
    // Two's complement wrap to 16 bits.
    es = ((es + 32768) & 32'hFFFF) - 32768;
    ed = ((ed + 32768) & 32'hFFFF) - 32768;
    checks += 2;
    if (int'(sum) != es) begin
      failures++;
      $display("FAIL add: %0d + %0d got %0d expected %0d", a, b, sum, es);
    end
    if (int'(diff) != ed) begin
      failures++;
      $display("FAIL sub: %0d - %0d got %0d expected %0d", a, b, diff, ed);
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
    check_one(0, 0);
    check_one(16384, 27);
    check_one(16384, -27);
    check_one(32767, 1);
    check_one(-32768, 1);
    check_one(-32768, -1);
    check_one(100, -32768);
    repeat (20000) check_one(int'($urandom_range(65535)) - 32768, int'($urandom_range(65535)) - 32768);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
