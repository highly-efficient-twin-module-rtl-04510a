// exp_lut: one of the three exponent tables (MSB, MID, LSB), 1 clock latency.
//
// Entry k holds e^(k * 2^-SHIFT), or e^(k * 2^-SHIFT) - 1 when MINUS_ONE is set,
// rounded to nearest with OFRAC fraction bits and OW bits in all. The MSB table
// (SHIFT = 9) stores the full value, the MID (SHIFT = 18) and LSB (SHIFT = 27) tables
// store the value minus one, which is small and lets the following multipliers be
// narrow. Contents are computed at start-up by a Taylor series in 200-bit fixed point
// (160 fraction bits): t_0 = 1, t_n = t_(n-1) * k * 2^-SHIFT / n, summed until a term
// vanishes. The three 9-bit tables follow the algorithm description (block RAMs in
// the original); the minus-one storage and the widths are this implementation's.
// The address is registered into a synchronous read: data appears one clock later.
module exp_lut #(
  parameter int unsigned ABITS     = 9,
  parameter int unsigned SHIFT     = 9,
  parameter bit          MINUS_ONE = 1'b0,
  parameter int unsigned OFRAC     = 64,
  parameter int unsigned OW        = 66
) (
  input  logic             clk,
  input  logic [ABITS-1:0] addr,
  output logic [OW-1:0]    data
);
  localparam int unsigned CF = 160;  // fraction bits of the computation

  function automatic logic [OW-1:0] entry(input int unsigned k);
    logic [199:0] sum, term;
    sum  = 200'(1) << CF;
    term = 200'(1) << CF;
    for (int n = 1; n < 64; n++) begin
      term = ((term * 200'(k)) >> SHIFT) / 200'(n);
      sum  = sum + term;
    end
    if (MINUS_ONE) sum = sum - (200'(1) << CF);
    sum = sum + (200'(1) << (CF - OFRAC - 1));
    return OW'(sum >> (CF - OFRAC));
  endfunction

  logic [OW-1:0] rom [2**ABITS];

  initial begin
    for (int k = 0; k < 2**ABITS; k++) rom[k] = entry(k);
  end

  always_ff @(posedge clk) data <= rom[addr];
endmodule
