// tb_exp_normalize: checks the final rounding and packing stage, 1 clock latency.
// Random mantissas y in [1, 2] (64 fraction bits, some at or just above 2, some
// that round up to 2; none an exact tie, where the rounding modes differ) and exponents x_I are packed; the reference is the real value
// y * 2^x_I formed by the simulator's own rounding (the mantissa enters as two
// exact halves whose sum rounds once), with +inf above the range and +0 below it.
// The special flags must override the value.
module tb_exp_normalize;
  import exp_pkg::*;
  logic clk = 1'b0;
  logic [RF+2:0] y_fx = '0;
  logic signed [IW-1:0] x_int = '0;
  special_t sp = '0;
  logic [63:0] y;
  int checks = 0, failures = 0;

  exp_normalize dut (.clk, .y_fx, .x_int, .sp, .y);
  always #5 clk = ~clk;

  function automatic logic [63:0] reference(input logic [RF+2:0] m, input int e, input special_t s);
    real v;
    if (s.nan)  return QNAN;
    if (s.inf)  return POS_INF;
    if (s.zero) return '0;
    // exact halves, one rounding in the sum: y rounded to 53 bits
    v = $itor(m >> 32) * 4294967296.0 + $itor(m[31:0]);
    v = v / 18446744073709551616.0;                 // * 2^-64, exact
    if (e > 1100)  return POS_INF;
    if (e < -1100) return '0;
    for (int k = 0; k < (e < 0 ? -e : e); k++) v = (e < 0) ? v / 2.0 : v * 2.0;
    if ($realtobits(v) < 64'h0010_0000_0000_0000) return '0;
    return $realtobits(v);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      logic [RF+2:0] m;
      int e;
      special_t s;
      m = {3'b001, $urandom, $urandom};
      case (n % 8)
        0: m = {3'b001, {52{1'b1}}, 12'hFFF};          // rounds up to 2
        1: m = {3'b010, 64'($urandom)};                // just above 2
        2: m = {3'b001, 64'h0};                        // exactly 1
        default: m[0] = 1'b1;                          // never an exact tie
      endcase
      e = int'($urandom % 2200) - 1100;
      if (n % 5 == 0) e = int'($urandom % 40) - 20;
      if (n % 97 == 0) e = -1023;
      if (n % 89 == 0) e = 1023;
      s = '0;
      if (n % 50 == 7) s.nan = 1'b1;
      if (n % 50 == 17) s.inf = 1'b1;
      if (n % 50 == 27) s.zero = 1'b1;
      y_fx <= m; x_int <= IW'(e); sp <= s;
      @(posedge clk);
      @(posedge clk);
      #1;
      checks++;
      if (y != reference(m, e, s)) begin
        failures++;
        if (failures < 10) $display("FAIL y=%h x_I=%0d sp=%b: got %h expected %h", m, e, s, y, reference(m, e, s));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
