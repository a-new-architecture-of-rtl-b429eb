// ddfs_mult: the theta multiplier of the DDFS datapath.
//
// Multiplies a signed sine or cosine sample by the unsigned frequency control
// word and returns theta * sample in the sample's own format. The full
// W x FW product has THETA_FRAC fraction bits more than the sample, so it is
// shifted right by THETA_FRAC. With ROUND = 1 the shift rounds to nearest
// (half up) by adding 2^(THETA_FRAC-1) first; with ROUND = 0 it truncates
// toward minus infinity. The product of a sample below 2.0 and a theta below
// 1 rad always fits in W bits, so the result is simply the low W bits.
//
// The low THETA_FRAC bits of the product (below one sample LSB) and its top
// bit (always a copy of the sign) are dropped on purpose.
//
// Purely combinational, no latency. The 16 x 16 size follows the published
// architecture; the scaling of theta and the rounding are this design's own
// choices.
module ddfs_mult
  import ddfs_pkg::*;
#(
  parameter int unsigned W          = SAMPLE_W,
  parameter int unsigned FW         = FCW_W,
  parameter int unsigned THETA_FRAC = FCW_FRAC,
  parameter bit          ROUND      = 1'b1
) (
  input  logic signed [W-1:0]  sample_i,
  input  logic        [FW-1:0] fctrl_i,
  output logic signed [W-1:0]  product_o
);

  localparam int unsigned PW = W + FW + 1;

  logic signed [PW-1:0] full;
  logic signed [PW-1:0] biased;

  always_comb begin
    // Zero-extend the control word so it multiplies as a positive number.
    full    = PW'(sample_i) * $signed({1'b0, fctrl_i});
    biased  = ROUND ? full + (PW'(1) <<< (THETA_FRAC - 1)) : full;
    product_o = biased[THETA_FRAC +: W];
  end

endmodule
