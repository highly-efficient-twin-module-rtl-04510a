// tb_trunc_mult: checks the reduced-width array multiplier against a bit-level sum
// of the partial products a[i]&b[j] with i+j >= DROP, computed here one bit at a
// time, and an exact instance (DROP = 0) against the * operator. Also checks the
// error bound (0 <= exact - result < DROP * 2^DROP) and the pipeline latency. A
// third instance with five stages must give the same results two clocks later.
module tb_trunc_mult;
  localparam int AW = 16, BW = 12, DROP = 8, LAT = 3;
  logic clk = 1'b0;
  logic [AW-1:0] a = '0;
  logic [BW-1:0] b = '0;
  logic [AW+BW-1:0] p_tr, p_ex;
  int checks = 0, failures = 0;

  trunc_mult #(.AW(AW), .BW(BW), .DROP(DROP), .LATENCY(LAT)) dut_tr (.clk, .a, .b, .p(p_tr));
  trunc_mult #(.AW(AW), .BW(BW), .DROP(0),    .LATENCY(LAT)) dut_ex (.clk, .a, .b, .p(p_ex));
  // five stages over twelve rows: uneven groups, the last one empty
  logic [AW+BW-1:0] p_l5, p_tr_d1, p_tr_d2;
  trunc_mult #(.AW(AW), .BW(BW), .DROP(DROP), .LATENCY(LAT+2)) dut_l5 (.clk, .a, .b, .p(p_l5));

  always #5 clk = ~clk;

  function automatic logic [AW+BW-1:0] model(input logic [AW-1:0] x, input logic [BW-1:0] y);
    logic [AW+BW-1:0] s = '0;
    for (int i = 0; i < AW; i++)
      for (int j = 0; j < BW; j++)
        if (i + j >= DROP && x[i] && y[j]) s = s + ((AW+BW)'(1) << (i + j));
    return s;
  endfunction

  task automatic check(input logic [AW+BW-1:0] got, exp_v, input string what);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp_v);
    end
  endtask

  logic [AW-1:0] aq[$];
  logic [BW-1:0] bq[$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000 + LAT; n++) begin
      logic [AW-1:0] na;
      logic [BW-1:0] nb;
      na = (n == 0) ? '1 : AW'($urandom);
      nb = (n == 0) ? '1 : BW'($urandom);
      a <= na; b <= nb;
      aq.push_back(na); bq.push_back(nb);
      @(posedge clk);
      #1;
      if (n >= LAT + 1) check(p_l5, p_tr_d2, "five-stage pipeline");
      p_tr_d2 = p_tr_d1;
      p_tr_d1 = p_tr;
      if (n >= LAT - 1) begin
        logic [AW-1:0] ca;
        logic [BW-1:0] cb;
        logic [AW+BW-1:0] ex;
        ca = aq.pop_front(); cb = bq.pop_front();
        ex = (AW+BW)'(ca) * (AW+BW)'(cb);
        check(p_ex, ex, "exact product");
        check(p_tr, model(ca, cb), "truncated array");
        checks++;
        if (p_tr > ex || ex - p_tr >= (AW+BW)'(DROP) << DROP || p_tr[DROP-1:0] != '0) begin
          failures++;
          if (failures < 10) $display("FAIL bound: %h x %h -> %h (exact %h)", ca, cb, p_tr, ex);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
