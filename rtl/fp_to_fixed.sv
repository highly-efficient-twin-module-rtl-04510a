// fp_to_fixed: IEEE-754 double to two's-complement fixed point, 5 clock latency.
//
// The argument's magnitude 1.m * 2^e is shifted to a fixed-point value with FW = 60
// fraction bits; bits below 2^-60 are dropped, so |x| < 2^-60 becomes 0 (exp gives 1).
// A negative argument is then negated, which moves the sign into the integer part:
// -x_i - x_f becomes -(x_i + 1) + (1 - x_f), so all later tables index a non-negative
// fraction. This sign migration and the 5-cycle latency follow the algorithm
// description; the stage split below is this implementation's:
//   cycle 1  unpack and classify      cycle 2  shift into fixed point
//   cycle 3  ones' complement         cycle 4  add the one        cycle 5  output register
// Special results: NaN gives NaN, +inf and x >= 1024 give +inf, -inf and x <= -1024 give
// +0. Arguments with 709.8 < |x| < 1024 are left to the exponent check at the end.
// Input and output are qualified outside this module (no valid here).
module fp_to_fixed
  import exp_pkg::*;
(
  input  logic                  clk,
  input  logic [63:0]           din,
  output logic signed [XW-1:0]  x_fx,
  output special_t              sp
);
  // cycle 1: unpack
  logic        s1_sign, s1_tiny;
  logic [10:0] s1_exp;
  logic [52:0] s1_mant;
  special_t    s1_sp;
  // cycle 2: shifted magnitude
  logic        s2_sign;
  logic [XW-1:0] s2_mag;
  special_t    s2_sp;
  // cycle 3/4: negation
  logic        s3_sign;
  logic [XW-1:0] s3_val, s4_val;
  special_t    s3_sp, s4_sp;

  always_ff @(posedge clk) begin
    // cycle 1
    s1_sign  <= din[63];
    s1_exp   <= din[62:52];
    s1_mant  <= {1'b1, din[51:0]};
    // below 2^-60 (this also covers zeros and subnormals)
    s1_tiny  <= (din[62:52] < 11'(1023 - 60));
    s1_sp.nan  <= (din[62:52] == 11'h7FF) && (din[51:0] != '0);
    // |x| >= 1024 or infinite
    s1_sp.inf  <= !din[63] && (din[62:52] >= 11'(1023 + 10)) &&
                  !((din[62:52] == 11'h7FF) && (din[51:0] != '0));
    s1_sp.zero <=  din[63] && (din[62:52] >= 11'(1023 + 10)) &&
                  !((din[62:52] == 11'h7FF) && (din[51:0] != '0));
  end

  // value = mant * 2^(e-52) in units of 2^-FW: {mant, 61 zeros} >> (53 - e)
  logic [113:0] wide;   // only [XW-1:0] is kept: |x| < 1024 never reaches the upper bits
  logic [10:0]  rsh;
  always_comb begin
    rsh  = 11'(53 + 1023) - s1_exp;
    wide = {s1_mant, 61'b0} >> rsh;
  end

  always_ff @(posedge clk) begin
    // cycle 2
    s2_sign <= s1_sign;
    s2_sp   <= s1_sp;
    if (s1_tiny || (s1_exp >= 11'(1023 + 10))) s2_mag <= '0;
    else                                       s2_mag <= wide[XW-1:0];
    // cycle 3
    s3_sign <= s2_sign;
    s3_sp   <= s2_sp;
    s3_val  <= s2_sign ? ~s2_mag : s2_mag;
    // cycle 4
    s4_sp   <= s3_sp;
    s4_val  <= s3_val + XW'(s3_sign);
    // cycle 5
    sp      <= s4_sp;
    x_fx    <= s4_val;
  end
endmodule
