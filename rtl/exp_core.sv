// exp_core: pipelined IEEE-754 double precision e^x, one argument per clock,
// result 30 clocks later.
//
// Method. The argument is turned into fixed point with its sign moved into the
// integer part, then split as x = x_I*ln2 + x_F with x_I = floor(x*log2 e) and
// 0 <= x_F < ln 2, so e^x = 2^x_I * e^x_F. The 60-bit fraction x_F is cut into
// x_M (bits 2^-1..2^-9), x_D (2^-10..2^-18), x_L (2^-19..2^-27) and the tail x_T
// (2^-28..2^-60), and
//     e^x_F = e^x_M * e^x_D * e^x_L * (1 + x_T),
// using three 512-entry tables and a first-order Taylor (Maclaurin) term, which is
// exact enough because x_T < 2^-27. Each product A*B with B = 1 + b, b small, is
// formed as A + A*b, so every multiplier has one narrow operand:
//     M  = e^x_M + e^x_M*(e^x_D - 1)                      (multiplier 6 clk, add+round 1)
//     L1 = (e^x_L - 1) + x_T + (e^x_L - 1)*x_T            (multiplier 4 clk, round 1, align+add 1)
//     Y  = M + M*L1                                       (multiplier 6 clk, round+add 2)
// All three multipliers are trunc_mult with the lowest 56 product columns not
// built, leaving 8 guard bits below the 64-bit rounding point.
//
// Pipeline (clock at which each value is valid, input at 0):
//   fp_to_fixed 5 | mul_inv_ln2 7 (argument delayed 2 alongside) | int_frac_sep 12 |
//   tables and Maclaurin 13 | delay alignment 14 | e^x_M*(e^x_D-1) 20, M 21 |
//   (e^x_L-1)*x_T 18, rounded 19, L1 20, delayed 21 | M*L1 27 | Y 29 | normalize 30.
// x_I is delayed 17 clocks from the separation stage, the special-case flags 24 from
// the conversion. The block diagram, the split of x_F and the stage latencies follow
// the algorithm description; the A + A*b form of each product, the widths, the guard
// bits and the handling of special values are this implementation's.
// Interface: in_valid/x in, out_valid/y out, no back-pressure. Reset clears only the
// valid pipeline.
module exp_core
  import exp_pkg::*;
#(
  parameter int unsigned LATENCY = 30   // fixed by the stage latencies; not a knob
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [63:0] x,
  output logic        out_valid,
  output logic [63:0] y
);
  localparam int unsigned DROP = RF - 8;   // 8 guard bits below the rounding point

  // ---------------- argument reduction ----------------
  logic signed [XW-1:0] x_fx, x_fx_d;
  special_t             sp, sp_d;
  logic signed [IW-1:0] x_int, x_int_s, x_int_d;
  logic        [FW-1:0] x_frac;

  fp_to_fixed u_conv (.clk, .din(x), .x_fx, .sp);
  mul_inv_ln2 u_mul  (.clk, .x_fx, .x_int);
  delay_line #(.WIDTH(XW), .DEPTH(2)) u_dx (.clk, .d(x_fx), .q(x_fx_d));
  int_frac_sep u_sep (.clk, .x_fx(x_fx_d), .x_int, .x_frac, .x_int_o(x_int_s));

  // ---------------- tables and Maclaurin term ----------------
  logic [RF+1:0]   lut_m, lut_m_a;     // e^x_M         (2.64)
  logic [55:0]     lut_d, lut_d_a;     // e^x_D - 1     (< 2^-8, 2^-64 units)
  logic [46:0]     lut_l, lut_l_a;     // e^x_L - 1     (< 2^-18, 2^-64 units)
  logic [TW+3:0]   mac, mac_a;         // x_T           (2^-64 units)

  exp_lut #(.SHIFT(9),  .MINUS_ONE(1'b0), .OFRAC(RF), .OW(RF+2)) u_lut_msb
    (.clk, .addr(x_frac[FW-1   -: ABITS]), .data(lut_m));
  exp_lut #(.SHIFT(18), .MINUS_ONE(1'b1), .OFRAC(RF), .OW(56))   u_lut_mid
    (.clk, .addr(x_frac[FW-1-9  -: ABITS]), .data(lut_d));
  exp_lut #(.SHIFT(27), .MINUS_ONE(1'b1), .OFRAC(RF), .OW(47))   u_lut_lsb
    (.clk, .addr(x_frac[FW-1-18 -: ABITS]), .data(lut_l));

  // Maclaurin: e^x_T ~ 1 + x_T; the term x_T, aligned to 2^-64 units
  always_ff @(posedge clk) mac <= {x_frac[TW-1:0], 4'b0};

  // delay alignment (1 clk each)
  always_ff @(posedge clk) begin
    lut_m_a <= lut_m;
    lut_d_a <= lut_d;
    lut_l_a <= lut_l;
    mac_a   <= mac;
  end

  // ---------------- MSB x MID ----------------
  logic [RF+1+56:0] p1;
  logic [RF+1:0]    lut_m_d6, mm;
  trunc_mult #(.AW(RF+2), .BW(56), .DROP(DROP), .LATENCY(6)) u_m1
    (.clk, .a(lut_m_a), .b(lut_d_a), .p(p1));
  delay_line #(.WIDTH(RF+2), .DEPTH(6)) u_dm (.clk, .d(lut_m_a), .q(lut_m_d6));
  // add and round
  always_ff @(posedge clk)
    mm <= lut_m_d6 + (RF+2)'((p1 + (($bits(p1))'(1) << (RF-1))) >> RF);

  // ---------------- LSB x Maclaurin ----------------
  logic [46+TW+4:0] p2;
  logic [19:0]      p2r;
  logic [46:0]      lut_l_d5;
  logic [TW+3:0]    mac_d5;
  logic [47:0]      l1, l1_d;
  trunc_mult #(.AW(47), .BW(TW+4), .DROP(DROP), .LATENCY(4)) u_m2
    (.clk, .a(lut_l_a), .b(mac_a), .p(p2));
  always_ff @(posedge clk) p2r <= 20'((p2 + (($bits(p2))'(1) << (RF-1))) >> RF);   // round
  delay_line #(.WIDTH(47),   .DEPTH(5)) u_dl (.clk, .d(lut_l_a), .q(lut_l_d5));
  delay_line #(.WIDTH(TW+4), .DEPTH(5)) u_dt (.clk, .d(mac_a),   .q(mac_d5));
  // align and add
  always_ff @(posedge clk) l1 <= 48'(lut_l_d5) + 48'(mac_d5) + 48'(p2r);
  delay_line #(.WIDTH(48), .DEPTH(1)) u_dl1 (.clk, .d(l1), .q(l1_d));

  // ---------------- final multiplier ----------------
  logic [RF+1+48:0] p3;
  logic [RF+1:0]    mm_d6;
  logic [49:0]      p3r;
  logic [RF+2:0]    y_fx;
  trunc_mult #(.AW(RF+2), .BW(48), .DROP(DROP), .LATENCY(6)) u_m3
    (.clk, .a(mm), .b(l1_d), .p(p3));
  delay_line #(.WIDTH(RF+2), .DEPTH(6)) u_dmm (.clk, .d(mm), .q(mm_d6));
  // round and add, 2 clk
  logic [RF+1:0] mm_d7;
  always_ff @(posedge clk) begin
    p3r   <= 50'((p3 + (($bits(p3))'(1) << (RF-1))) >> RF);
    mm_d7 <= mm_d6;
    y_fx  <= (RF+3)'(mm_d7) + (RF+3)'(p3r);
  end

  // ---------------- exponent and special-case paths ----------------
  delay_line #(.WIDTH(IW), .DEPTH(17))    u_di (.clk, .d(x_int_s), .q(x_int_d));
  delay_line #(.WIDTH($bits(special_t)), .DEPTH(24)) u_ds (.clk, .d(sp), .q(sp_d));

  exp_normalize u_norm (.clk, .y_fx, .x_int(x_int_d), .sp(sp_d), .y);

  // ---------------- valid pipeline ----------------
  logic [LATENCY-1:0] vpipe;
  always_ff @(posedge clk) begin
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[LATENCY-2:0], in_valid};
  end
  assign out_valid = vpipe[LATENCY-1];
endmodule
