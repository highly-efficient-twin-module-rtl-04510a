// trunc_mult: unsigned array multiplier with reduced arithmetic width, pipelined.
//
// The product a*b is the sum of the partial products a[i]&b[j] placed in column i+j.
// Columns below DROP are not built at all: their AND terms and the carries they would
// send into column DROP are missing, so the result is never above the exact product
// and falls short of it by less than DROP * 2^DROP (one lost carry path per column,
// weighted). The caller keeps guard columns between DROP and its rounding point so
// that this shortfall stays below its last kept bit. Bits of the result below DROP
// are zero. The dropped-column scheme follows the reduced-width array multiplier of
// the algorithm description; the pipelining below is this implementation's.
// Pipelining: the operands are registered, then the rows of the array (one per bit
// of b) are split into LATENCY groups of about BW/LATENCY rows. Group g is added to a
// running sum between register g and register g+1; the last group is added after the
// last register, so the product is valid LATENCY clocks after the operands and feeds
// the caller's next register directly (LATENCY >= 1). Operands travel with the sum.
module trunc_mult #(
  parameter int unsigned AW      = 8,
  parameter int unsigned BW      = 8,
  parameter int unsigned DROP    = 0,
  parameter int unsigned LATENCY = 1
) (
  input  logic             clk,
  input  logic [AW-1:0]    a,
  input  logic [BW-1:0]    b,
  output logic [AW+BW-1:0] p
);
  localparam int unsigned PW = AW + BW;
  localparam int unsigned CH = (BW + LATENCY - 1) / LATENCY;   // rows per stage
  // columns that are built
  localparam logic [PW-1:0] KEEP = ~(PW'(0)) << DROP;

  // sum of rows j in [lo, lo+CH) of the array, low columns removed
  function automatic logic [PW-1:0] rows(input logic [AW-1:0] ra, input logic [BW-1:0] rb,
                                         input int unsigned lo);
    logic [PW-1:0] s = '0;
    for (int unsigned j = lo; j < lo + CH; j++)
      if (j < BW && rb[j]) s = s + ((PW'(ra) << j) & KEEP);
    return s;
  endfunction

  logic [AW-1:0] ar  [LATENCY];
  logic [BW-1:0] br  [LATENCY];
  logic [PW-1:0] acc [LATENCY];

  always_ff @(posedge clk) begin
    ar[0]  <= a;
    br[0]  <= b;
    acc[0] <= '0;
    for (int s = 1; s < LATENCY; s++) begin
      ar[s]  <= ar[s-1];
      br[s]  <= br[s-1];
      acc[s] <= acc[s-1] + rows(ar[s-1], br[s-1], (s - 1) * CH);
    end
  end

  assign p = acc[LATENCY-1] + rows(ar[LATENCY-1], br[LATENCY-1], (LATENCY - 1) * CH);
endmodule
