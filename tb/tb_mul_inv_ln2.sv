// tb_mul_inv_ln2: checks x_I = floor(x * log2 e) on random fixed-point arguments
// (|x| < 1024, 60 fraction bits), 2 clocks latency. The reference is the floor of
// the product in real arithmetic. Within 1e-9 of an integer the design may answer
// one less (its deliberate downward bias); elsewhere it must match exactly.
module tb_mul_inv_ln2;
  import exp_pkg::*;
  localparam int LAT = 2;
  logic clk = 1'b0;
  logic signed [XW-1:0] x_fx = '0;
  logic signed [IW-1:0] x_int;
  int checks = 0, failures = 0, near = 0;

  mul_inv_ln2 dut (.clk, .x_fx, .x_int);
  always #5 clk = ~clk;

  function automatic real fx_to_real(input logic signed [XW-1:0] v);
    logic [XW-1:0] m;
    real r;
    m = v[XW-1] ? -v : v;
    r = ($itor(m >> 30) * 1073741824.0 + $itor(m[29:0])) / 1152921504606846976.0;
    return v[XW-1] ? -r : r;
  endfunction

  logic signed [XW-1:0] q[$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000 + LAT - 1; n++) begin
      logic signed [XW-1:0] a;
      case (n % 4)
        0: a = XW'(signed'({$urandom, $urandom, 8'($urandom)})) >>> 2;     // |x| up to 1024
        1: a = XW'(signed'({$urandom, $urandom})) >>> 4;                   // |x| < 1
        2: a = (n < 100) ? '0 : -XW'(1);                                   // 0 and -2^-60
        default: a = XW'(signed'({$urandom, $urandom, 8'($urandom)})) >>> 10;
      endcase
      x_fx <= a;
      q.push_back(a);
      @(posedge clk);
      #1;
      if (n >= LAT - 1) begin
        logic signed [XW-1:0] c;
        real z, f;
        int fl;
        c  = q.pop_front();
        z  = fx_to_real(c) * 1.4426950408889634;
        fl = int'($floor(z));
        f  = z - $floor(z);
        checks++;
        if (x_int == IW'(fl)) ;
        else if (x_int == IW'(fl - 1) && f < 1.0e-9) near++;
        else if (x_int == IW'(fl + 1) && f > 1.0 - 1.0e-9) near++;
        else begin
          failures++;
          if (failures < 10) $display("FAIL x=%h (%g): x_I %0d expected %0d", c, fx_to_real(c), x_int, fl);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
