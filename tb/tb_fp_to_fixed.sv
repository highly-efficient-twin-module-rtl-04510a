// tb_fp_to_fixed: checks the double to fixed-point conversion, 5 clocks latency.
// The expected value is built here as the signed integer trunc(|x| * 2^60) with the
// sign applied by negation, from the exponent and mantissa fields; arguments below
// 2^-60 must give 0. Special flags: NaN, +inf for +inf and x >= 1024, +0 for -inf
// and x <= -1024, none otherwise.
module tb_fp_to_fixed;
  import exp_pkg::*;
  localparam int LAT = 5;
  logic clk = 1'b0;
  logic [63:0] din = '0;
  logic signed [XW-1:0] x_fx;
  special_t sp;
  int checks = 0, failures = 0;

  fp_to_fixed dut (.clk, .din, .x_fx, .sp);
  always #5 clk = ~clk;

  function automatic logic signed [127:0] expect_fx(input logic [63:0] a);
    int e;
    logic signed [127:0] m;
    e = int'(a[62:52]) - 1023;
    if (a[62:52] == 0 || e < -60 || e >= 10) return '0;
    m = 128'({1'b1, a[51:0]});
    if (e - 52 + 60 >= 0) m = m << (e + 8);
    else                  m = m >> (-(e + 8));
    return a[63] ? -m : m;
  endfunction

  function automatic special_t expect_sp(input logic [63:0] a);
    special_t s;
    bit nan;
    nan = (a[62:52] == 11'h7FF) && (a[51:0] != 0);
    s.nan  = nan;
    s.inf  = !nan && !a[63] && (a[62:52] >= 11'd1033);
    s.zero = !nan &&  a[63] && (a[62:52] >= 11'd1033);
    return s;
  endfunction

  logic [63:0] q[$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] fixed_list[8] = '{64'h7FF8_0000_0000_0001, 64'h7FF0_0000_0000_0000,
                                   64'hFFF0_0000_0000_0000, 64'h0000_0000_0000_0000,
                                   64'h8000_0000_0000_0001, 64'h408F_FFFF_FFFF_FFFF,
                                   64'hC090_0000_0000_0000, 64'hBFF0_0000_0000_0000};
    for (int n = 0; n < 4000 + LAT - 1; n++) begin
      logic [63:0] a;
      if (n < 8) a = fixed_list[n];
      else begin
        a = {1'($urandom & 1), 11'(1023 - 64 + int'($urandom % 76)), $urandom, 20'($urandom)};
      end
      din <= a;
      q.push_back(a);
      @(posedge clk);
      #1;
      if (n >= LAT - 1) begin
        logic [63:0] c;
        logic signed [127:0] ex;
        c  = q.pop_front();
        ex = expect_fx(c);
        checks += 2;
        if (128'(x_fx) != ex) begin
          failures++;
          if (failures < 10) $display("FAIL %h: got %h expected %h", c, x_fx, ex);
        end
        if (sp != expect_sp(c)) begin
          failures++;
          if (failures < 10) $display("FAIL %h: flags %b", c, sp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
