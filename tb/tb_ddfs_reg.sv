// tb_ddfs_reg: self-checking test of the channel state register.
//
// Two instances with the sine (0) and cosine (16384) start values. The test
// checks the reset value, that reset acts without a clock edge, that the
// register holds between edges and loads d_i on each rising edge, one cycle
// of latency.
module tb_ddfs_reg;
  import ddfs_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  sample_t d;
  sample_t q_sin, q_cos;
  int checks = 0;
  int failures = 0;

  ddfs_reg #(.INIT(16'sd0))     dut_sin (.clk(clk), .rst_n(rst_n), .d_i(d), .q_o(q_sin));
  ddfs_reg #(.INIT(16'sd16384)) dut_cos (.clk(clk), .rst_n(rst_n), .d_i(d), .q_o(q_cos));

  always #5 clk = ~clk;

  task automatic expect_q(sample_t es, sample_t ec, string what);
    checks += 2;
    if (q_sin !== es) begin
      failures++;
      $display("FAIL %s: sine register %0d expected %0d", what, q_sin, es);
    end
    if (q_cos !== ec) begin
      failures++;
      $display("FAIL %s: cosine register %0d expected %0d", what, q_cos, ec);
    end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sample_t v;
    d = 16'sh1234;
    // Asynchronous reset, asserted and checked between clock edges.
    @(negedge clk);
    #2 rst_n = 1'b0;
    #1 expect_q(16'sd0, 16'sd16384, "async reset");
    @(posedge clk);
    #1 expect_q(16'sd0, 16'sd16384, "held in reset");
    @(negedge clk) rst_n = 1'b1;
    // Loads on each edge.
    repeat (1000) begin
      v = sample_t'($urandom());
      @(negedge clk) d = v;
      #1 expect_q(q_sin, q_cos, "hold between edges");
      @(posedge clk);
      #1 expect_q(v, v, "load");
    end
    // Reset again after operation.
    @(negedge clk) rst_n = 1'b0;
    #1 expect_q(16'sd0, 16'sd16384, "second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
