// exp_normalize: final stage of exp(), 1 clock latency.
//
// Takes the mantissa product y in fixed point (RF = 64 fraction bits, value in
// [1, 2], at most a hair above 2), the integer part x_I and the special-case flags,
// and forms the IEEE double 2^x_I * y. If y >= 2 the mantissa is shifted right one
// place and the exponent raised. The mantissa is rounded to 52 fraction bits, to
// nearest with ties away from zero; a carry out of rounding raises the exponent.
// A biased exponent at or above 2047 gives +inf, at or below 0 gives +0 (no
// subnormal results). NaN, +inf and +0 flags override the computed value.
// Rounding mode, the flush of subnormals and the special-case encoding are this
// implementation's choices; the stage and its latency follow the algorithm description.
// Bit 63 (the sign) is always 0: e^x is never negative.
module exp_normalize
  import exp_pkg::*;
(
  input  logic                  clk,
  input  logic [RF+2:0]         y_fx,
  input  logic signed [IW-1:0]  x_int,
  input  special_t              sp,
  output logic [63:0]           y
);
  logic              big;
  logic [RF:0]       m;       // 1.f with RF fraction bits
  logic [53:0]       mr;      // rounded 1.f (52 fraction bits) plus carry bit
  logic signed [IW+1:0] e;
  logic [63:0]       res;

  always_comb begin
    big = y_fx[RF+1] | y_fx[RF+2];
    m   = big ? y_fx[RF+1:1] : y_fx[RF:0];
    mr  = {1'b0, m[RF:RF-52]} + 54'(m[RF-53]);
    e   = (IW+2)'(x_int) + (IW+2)'(1023) + (IW+2)'(big) + (IW+2)'(mr[53]);
    if (sp.nan)            res = QNAN;
    else if (sp.inf)       res = POS_INF;
    else if (sp.zero)      res = '0;
    else if (e >= 2047)    res = POS_INF;
    else if (e <= 0)       res = '0;
    else                   res = {1'b0, e[10:0], mr[53] ? 52'b0 : mr[51:0]};
  end

  always_ff @(posedge clk) y <= res;
endmodule
