// mul_inv_ln2: integer part of x*log2(e), 2 clock latency.
//
// x_I = floor(x * log2(e)) selects the power of two of the result. The fixed-point
// argument is multiplied by log2(e) held to 68 fraction bits (cycle 1); a bias of
// 2^-56 is subtracted and the fraction dropped (cycle 2). The bias keeps the estimate
// below the exact product whatever the truncation of the constant, so x_I is never
// one too large and the reduced argument x - x_I*ln2 is never negative; at worst it
// exceeds ln 2 by less than 2^-55, which the tables cover. The constant
// multiplication and its 2-cycle latency follow the algorithm description; the
// bias is this implementation's way to make the floor safe.
module mul_inv_ln2
  import exp_pkg::*;
(
  input  logic                  clk,
  input  logic signed [XW-1:0]  x_fx,
  output logic signed [IW-1:0]  x_int
);
  localparam int unsigned PW = XW + 70;    // product width
  localparam int unsigned PF = FW + LOG2E_F; // product fraction bits (128)

  logic signed [PW-1:0] prod, biased;

  always_ff @(posedge clk) prod <= x_fx * $signed({1'b0, LOG2E});

  always_comb biased = prod - (PW'(1) << (PF - 56));

  always_ff @(posedge clk) x_int <= IW'(biased >>> PF);
endmodule
