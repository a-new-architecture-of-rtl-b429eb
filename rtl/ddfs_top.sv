// ddfs_top: ROM-less quadrature direct digital frequency synthesizer.
//
// Instead of a phase accumulator and a sine table, the synthesizer keeps the
// current sine and cosine values in two registers and rotates them by a small
// angle theta every clock, using the first-order angle-sum update
//
//   sin(k+1) = sin(k) + theta * cos(k)
//   cos(k+1) = cos(k) - theta * sin(k)
//
// The higher-order terms of the angle-sum formula are dropped, which is
// accurate while theta is small. The datapath is exactly two multipliers,
// one adder and one subtractor, and two registers: the sine register output
// feeds the multiplier whose product is subtracted in the cosine channel, and
// the cosine register output feeds the multiplier whose product is added in
// the sine channel. Both channels use the register values of the same cycle.
//
// Interface: fctrl_i is theta as an unsigned number with THETA_FRAC fraction
// bits (theta = fctrl / 2^16 rad at the defaults), so the output frequency is
// f_out = fctrl / 2^16 / (2*pi) * f_clk. sin_o and cos_o are signed W-bit
// words with 1.0 = 2^(W-2) = 16384. After reset sin_o = 0 and cos_o = 16384;
// each rising clock edge produces the next sample pair. A change of fctrl_i
// takes effect at the next edge and the phase stays continuous, since the
// state is the (sin, cos) pair itself.
//
// Timing: the critical path is register -> 16 x 16 multiplier -> 16-bit
// adder -> register, one cycle.
//
// Word widths, the datapath structure and the start values follow the
// design. The theta scaling, rounding of the products and the reset style are
// this design's own choices. The update matrix has determinant 1 + theta^2,
// so the amplitude grows slowly and rounding errors accumulate: the outputs
// track the ideal sine and cosine for a limited number of cycles (about a
// quarter to one period at the fctrl values tested), not indefinitely.
module ddfs_top
  import ddfs_pkg::*;
#(
  parameter int unsigned W          = SAMPLE_W,
  parameter int unsigned FW         = FCW_W,
  parameter int unsigned THETA_FRAC = FCW_FRAC,
  parameter bit          ROUND      = 1'b1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic        [FW-1:0] fctrl_i,
  output logic signed [W-1:0]  sin_o,
  output logic signed [W-1:0]  cos_o
);

  // Start values of the recursion: sin(0) = 0, cos(0) = 1.0 = 2^(W-2).
  localparam logic signed [W-1:0] ZERO = '0;
  localparam logic signed [W-1:0] ONE  = W'(1) <<< (W - 2);

  logic signed [W-1:0] sin_q, cos_q;
  logic signed [W-1:0] theta_cos, theta_sin;
  logic signed [W-1:0] sin_d, cos_d;

  // theta * cos(k), added in the sine channel.
  ddfs_mult #(.W(W), .FW(FW), .THETA_FRAC(THETA_FRAC), .ROUND(ROUND)) u_mult_cos (
    .sample_i (cos_q),
    .fctrl_i  (fctrl_i),
    .product_o(theta_cos)
  );

  // theta * sin(k), subtracted in the cosine channel.
  ddfs_mult #(.W(W), .FW(FW), .THETA_FRAC(THETA_FRAC), .ROUND(ROUND)) u_mult_sin (
    .sample_i (sin_q),
    .fctrl_i  (fctrl_i),
    .product_o(theta_sin)
  );

  ddfs_addsub #(.W(W), .SUBTRACT(1'b0)) u_add_sin (
    .a_i  (sin_q),
    .b_i  (theta_cos),
    .sum_o(sin_d)
  );

  ddfs_addsub #(.W(W), .SUBTRACT(1'b1)) u_sub_cos (
    .a_i  (cos_q),
    .b_i  (theta_sin),
    .sum_o(cos_d)
  );

  ddfs_reg #(.W(W), .INIT(ZERO)) u_reg_sin (
    .clk  (clk),
    .rst_n(rst_n),
    .d_i  (sin_d),
    .q_o  (sin_q)
  );

  ddfs_reg #(.W(W), .INIT(ONE)) u_reg_cos (
    .clk  (clk),
    .rst_n(rst_n),
    .d_i  (cos_d),
    .q_o  (cos_q)
  );

  assign sin_o = sin_q;
  assign cos_o = cos_q;

endmodule
