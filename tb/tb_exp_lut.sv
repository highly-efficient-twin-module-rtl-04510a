// tb_exp_lut: checks the three exponent tables as exp_core instantiates them.
// Entries are compared with the simulator's real exp(): the MSB table (value
// e^(k/512), 64 fraction bits) within 2^-50; the MID and LSB tables (e^y - 1 for
// y = k*2^-18 and k*2^-27) against the series y + y^2/2 + ... + y^9/9! within half a
// unit of the last stored bit plus the rounding of the real arithmetic. Entry 0 must
// be exactly 1, 0 and 0. Read latency is one clock.
module tb_exp_lut;
  logic clk = 1'b0;
  logic [8:0] addr = '0;
  logic [65:0] dm;
  logic [55:0] dd;
  logic [46:0] dl;
  int checks = 0, failures = 0;

  exp_lut #(.SHIFT(9),  .MINUS_ONE(1'b0), .OFRAC(64), .OW(66)) u_m (.clk, .addr, .data(dm));
  exp_lut #(.SHIFT(18), .MINUS_ONE(1'b1), .OFRAC(64), .OW(56)) u_d (.clk, .addr, .data(dd));
  exp_lut #(.SHIFT(27), .MINUS_ONE(1'b1), .OFRAC(64), .OW(47)) u_l (.clk, .addr, .data(dl));

  always #5 clk = ~clk;

  function automatic real to_real(input logic [65:0] v);
    return $itor(v >> 32) * 4294967296.0 + $itor(v[31:0]);
  endfunction
  function automatic real em1(input real y);
    real t = 0.0;
    for (int n = 9; n >= 1; n--) t = (t + 1.0) * y / real'(n);
    return t;
  endfunction

  function automatic real absr(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  task automatic fail(input string s);
    failures++;
    if (failures < 10) $display("FAIL %s", s);
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real two64 = 18446744073709551616.0;
    for (int k = 0; k < 512; k++) begin
      real vm, vd, vl, rm, rd, rl;
      addr <= 9'(k);
      @(posedge clk);   // address registered into the table
      #1;
      vm = to_real(dm) / two64;
      vd = to_real(66'(dd)) / two64;
      vl = to_real(66'(dl)) / two64;
      rm = $exp(real'(k) / 512.0);
      rd = em1(real'(k) / 262144.0);
      rl = em1(real'(k) / 134217728.0);
      checks += 3;
      if (absr(vm - rm) > 1.0e-15) fail($sformatf("MSB[%0d] %h", k, dm));
      if (absr(vd - rd) > 2.3e-16 * rd + 3.0e-20) fail($sformatf("MID[%0d] %h", k, dd));
      if (absr(vl - rl) > 2.3e-16 * rl + 3.0e-20) fail($sformatf("LSB[%0d] %h", k, dl));
      if (k == 0) begin
        checks++;
        if (dm != 66'(1) << 64 || dd != 0 || dl != 0) fail("entry 0");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
