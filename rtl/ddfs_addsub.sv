// ddfs_addsub: the W-bit adder of one DDFS channel.
//
// The sine channel adds the multiplier product to the old sine value
// (SUBTRACT = 0); the cosine channel subtracts the product from the old
// cosine value (SUBTRACT = 1), as the update sin' = sin + theta*cos,
// cos' = cos - theta*sin requires. The result wraps modulo 2^W like a plain
// two's complement adder. Saturation is not part of the published
// architecture, and while |sin| and |cos| stay near 1.0 in a format that
// reaches 2.0 none is needed. Combinational, no latency.
module ddfs_addsub #(
  parameter int unsigned W        = 16,
  parameter bit          SUBTRACT = 1'b0
) (
  input  logic signed [W-1:0] a_i,
  input  logic signed [W-1:0] b_i,
  output logic signed [W-1:0] sum_o
);

  always_comb begin
    if (SUBTRACT) sum_o = a_i - b_i;
    else          sum_o = a_i + b_i;
  end

endmodule
