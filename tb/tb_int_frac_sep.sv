// tb_int_frac_sep: checks x_F = x - x_I*ln2 on random fixed-point arguments with
// x_I = floor(x * log2 e) computed here in real arithmetic, 5 clocks latency.
// x_F (60 fraction bits) must match the real-valued difference within 2^-40 (the
// precision of real arithmetic at |x| up to 1024), and x_I must come out unchanged.
// Pairs whose real difference falls just below zero are skipped.
module tb_int_frac_sep;
  import exp_pkg::*;
  localparam int LAT = 5;
  logic clk = 1'b0;
  logic signed [XW-1:0] x_fx = '0;
  logic signed [IW-1:0] x_int = '0, x_int_o;
  logic [FW-1:0] x_frac;
  int checks = 0, failures = 0;

  int_frac_sep dut (.clk, .x_fx, .x_int, .x_frac, .x_int_o);
  always #5 clk = ~clk;

  function automatic real fx_to_real(input logic signed [XW-1:0] v);
    logic [XW-1:0] m;
    real r;
    m = v[XW-1] ? -v : v;
    r = ($itor(m >> 30) * 1073741824.0 + $itor(m[29:0])) / 1152921504606846976.0;
    return v[XW-1] ? -r : r;
  endfunction

  logic signed [XW-1:0] qx[$];
  logic signed [IW-1:0] qi[$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000 + LAT - 1; n++) begin
      logic signed [XW-1:0] a;
      logic signed [IW-1:0] i;
      a = (n % 2) ? XW'(signed'({$urandom, $urandom, 8'($urandom)})) >>> 2
                  : XW'(signed'({$urandom, $urandom})) >>> 2;
      i = IW'(int'($floor(fx_to_real(a) * 1.4426950408889634)));
      x_fx <= a; x_int <= i;
      qx.push_back(a); qi.push_back(i);
      @(posedge clk);
      #1;
      if (n >= LAT - 1) begin
        logic signed [XW-1:0] c;
        logic signed [IW-1:0] ci;
        real r, got;
        c = qx.pop_front(); ci = qi.pop_front();
        r   = fx_to_real(c) - real'(ci) * 0.6931471805599453;
        got = ($itor(x_frac >> 30) * 1073741824.0 + $itor(x_frac[29:0])) / 1152921504606846976.0;
        if (r > 1.0e-12) begin
          checks += 2;
          if (got - r > 1.0e-12 || r - got > 1.0e-12) begin
            failures++;
            if (failures < 10) $display("FAIL x=%h x_I=%0d: x_F %h (%g) expected %g", c, ci, x_frac, got, r);
          end
          if (x_int_o != ci) begin
            failures++;
            if (failures < 10) $display("FAIL x_I passed as %0d, expected %0d", x_int_o, ci);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
