// ddfs_reg: the W-bit state register of one DDFS channel.
//
// Loads d_i on every rising clock edge. An asynchronous active-low reset
// sets it to INIT, the start value of the recursion (0 for sine, 1.0 = 16384
// for cosine). The register has no enable: the synthesizer produces one new
// sample per clock. The reset style is this design's own choice.
module ddfs_reg #(
  parameter int unsigned        W    = 16,
  parameter logic signed [W-1:0] INIT = '0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] d_i,
  output logic signed [W-1:0] q_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q_o <= INIT;
    else        q_o <= d_i;
  end

endmodule
