// exp_pkg: shared widths, constants and types of the double precision exp() pipeline.
//
// The argument is carried in two's-complement fixed point with FW = 60 fraction bits
// (bits below 2^-60 have no visible effect on the result) and XW - FW integer bits
// including the sign. Results between stages are unsigned fixed point with RF = 64
// fraction bits. The reduced argument x_F is cut into three 9-bit table indices
// (bits 2^-1..2^-9, 2^-10..2^-18, 2^-19..2^-27) and a Taylor tail (2^-28..2^-60).
// The bit split and the 60-bit bound follow the algorithm description; the integer
// width, the 64-bit internal resolution and the constant precisions are choices of
// this implementation.
package exp_pkg;

  localparam int unsigned FW    = 60;        // fraction bits of the fixed-point argument
  localparam int unsigned XW    = 72;        // total width of the fixed-point argument
  localparam int unsigned IW    = 12;        // width of the signed integer part x_I
  localparam int unsigned RF    = 64;        // fraction bits of intermediate results
  localparam int unsigned ABITS = 9;         // index width of each exponent table
  localparam int unsigned TW    = FW - 3*ABITS; // Taylor tail width (33 bits)

  // log2(e) with 68 fraction bits, truncated.
  localparam int unsigned   LOG2E_F = 68;
  localparam logic [68:0]   LOG2E   = 69'h1_7154_7652_B82F_E177_7;
  // ln(2) with 76 fraction bits, truncated.
  localparam int unsigned   LN2_F   = 76;
  localparam logic [75:0]   LN2     = 76'hB172_17F7_D1CF_79AB_C9E;

  // Arguments whose result is fixed regardless of the datapath.
  typedef struct packed {
    logic nan;    // result is a quiet NaN
    logic inf;    // result is +infinity
    logic zero;   // result is +0
  } special_t;

  localparam logic [63:0] QNAN    = 64'h7FF8_0000_0000_0000;
  localparam logic [63:0] POS_INF = 64'h7FF0_0000_0000_0000;

endpackage
