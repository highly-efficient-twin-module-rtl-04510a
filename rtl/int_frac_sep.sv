// int_frac_sep: fractional part x_F = x - x_I*ln(2), 5 clock latency.
//
// With x_I from mul_inv_ln2, the reduced argument x_F = x - x_I*ln2 lies in [0, ln 2)
// (exceeding it by less than 2^-55 at worst). The product x_I*ln2 is formed with ln 2
// held to 76 fraction bits (cycle 1), subtracted from the argument at that precision
// (cycle 2), truncated to FW = 60 fraction bits and clamped to [0, 1) (cycle 3),
// then registered twice (cycles 4 and 5) to give the 5-cycle latency of the
// separation stage. x_I travels alongside and leaves with x_F.
// The arithmetic follows the algorithm description; the stage split, the clamp and
// the constant precision are this implementation's.
module int_frac_sep
  import exp_pkg::*;
(
  input  logic                  clk,
  input  logic signed [XW-1:0]  x_fx,
  input  logic signed [IW-1:0]  x_int,
  output logic        [FW-1:0]  x_frac,
  output logic signed [IW-1:0]  x_int_o
);
  localparam int unsigned SH = LN2_F - FW;       // 16 extra fraction bits
  localparam int unsigned RW = XW + SH + 1;      // width of the difference

  logic signed [RW-1:0] s1_x, s1_p, s2_r;
  logic signed [IW-1:0] s1_i, s2_i, s3_i, s4_i;
  logic        [FW-1:0] s3_f, s4_f;

  always_ff @(posedge clk) begin
    // cycle 1
    s1_x <= RW'(x_fx) <<< SH;
    s1_p <= x_int * $signed({1'b0, LN2});
    s1_i <= x_int;
    // cycle 2
    s2_r <= s1_x - s1_p;
    s2_i <= s1_i;
    // cycle 3
    if (s2_r < 0)                         s3_f <= '0;
    else if (s2_r >= (RW'(1) <<< LN2_F))  s3_f <= '1;
    else                                  s3_f <= s2_r[LN2_F-1:SH];
    s3_i <= s2_i;
    // cycles 4 and 5
    s4_f    <= s3_f;
    s4_i    <= s3_i;
    x_frac  <= s4_f;
    x_int_o <= s4_i;
  end
endmodule
