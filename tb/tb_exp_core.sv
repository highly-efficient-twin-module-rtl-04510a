// tb_exp_core: self-checking test of the double precision exp() pipeline.
//
// Drives special values (NaN, infinities, zeros, tiny and huge arguments, the
// overflow and underflow boundaries) and random arguments spread over the whole
// useful range, back to back one per clock, and compares every result with the
// simulator's own real-valued exp(): the results may differ by at most one unit in
// the last place; results below the smallest normal double must be +0 (or the
// smallest normal, if rounding lands there). Also checks the 30-clock latency of an
// isolated argument and that a stream of N arguments comes out in N consecutive clocks.
module tb_exp_core;
  localparam int LATENCY = 30;
  localparam int NRAND   = 4000;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        in_valid = 1'b0;
  logic [63:0] x = '0;
  logic        out_valid;
  logic [63:0] y;
  int checks = 0, failures = 0, exact = 0;

  exp_core dut (.clk, .rst_n, .in_valid, .x, .out_valid, .y);

  always #5 clk = ~clk;

  // expected results in order of issue
  logic [63:0] xq[$];

  function automatic logic [63:0] ref_exp(input logic [63:0] a);
    return $realtobits($exp($bitstoreal(a)));
  endfunction

  function automatic bit is_nan(input logic [63:0] a);
    return (a[62:52] == 11'h7FF) && (a[51:0] != 0);
  endfunction

  task automatic check_result(input logic [63:0] a, input logic [63:0] got);
    logic [63:0] r;
    longint d;
    bit ok;
    r = ref_exp(a);
    if (is_nan(a))                    ok = is_nan(got) && !got[63];
    else if (r < 64'h0010_0000_0000_0000) ok = (got == 64'h0) || (got == 64'h0010_0000_0000_0000);
    else begin
      d  = longint'(got) - longint'(r);
      ok = !got[63] && (d >= -1) && (d <= 1);
      if (d == 0) exact++;
    end
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20)
        $display("FAIL exp(%h = %g): got %h expected %h", a, $bitstoreal(a), got, r);
    end
  endtask

  // monitor
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (xq.size() == 0) begin
        failures++; checks++;
        $display("FAIL unexpected output");
      end else check_result(xq.pop_front(), y);
    end
  end

  task automatic send(input logic [63:0] a);
    in_valid <= 1'b1;
    x        <= a;
    xq.push_back(a);
    @(posedge clk);
  endtask

  task automatic idle();
    in_valid <= 1'b0;
    @(posedge clk);
  endtask

  function automatic logic [63:0] rand_arg(input int emin, input int emax);
    logic [63:0] a;
    int e;
    e = emin + int'($urandom % (emax - emin + 1));
    a = {1'b0, 11'(1023 + e), $urandom, 20'($urandom)};
    a[63] = 1'($urandom & 1);
    return a;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, lat, first, last, cnt;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // latency of one isolated argument
    send($realtobits(1.0));
    in_valid <= 1'b0;
    lat = 0;
    while (!out_valid) begin @(posedge clk); lat++; end
    checks++;
    if (lat != LATENCY) begin failures++; $display("FAIL latency %0d", lat); end
    @(posedge clk);

    // special and boundary values
    send(64'h7FF8_0000_0000_0000);                 // NaN
    send(64'h7FF0_0000_0000_0001);                 // signalling NaN
    send(64'h7FF0_0000_0000_0000);                 // +inf -> +inf
    send(64'hFFF0_0000_0000_0000);                 // -inf -> 0
    send(64'h0000_0000_0000_0000);                 // +0 -> 1
    send(64'h8000_0000_0000_0000);                 // -0 -> 1
    send(64'h0000_0000_0000_0001);                 // subnormal -> 1
    send($realtobits(1.0e-20));
    send($realtobits(-1.0e-20));
    send($realtobits(1.0e-17));
    send($realtobits(-3.0e-17));
    send($realtobits(0.6931471805599453));         // ~ln 2
    send($realtobits(-0.6931471805599453));
    send($realtobits(1.0));
    send($realtobits(-1.0));
    send($realtobits(709.7));
    send($realtobits(709.79));                     // overflow
    send($realtobits(800.0));                      // overflow through exponent
    send($realtobits(5000.0));                     // huge
    send($realtobits(-5000.0));                    // huge negative
    send($realtobits(-708.3));
    send($realtobits(-708.5));                     // below the normal range
    send($realtobits(-745.2));
    send($realtobits(1023.9));
    send($realtobits(-1023.9));
    for (int k = -10; k <= 10; k++) send($realtobits(real'(k) * 0.6931471805599453));
    idle();
    repeat (LATENCY + 2) @(posedge clk);

    // random arguments, back to back; count the output burst length
    fork
      begin
        for (int i = 0; i < NRAND; i++) begin
          logic [63:0] a;
          case (i % 4)
            0: a = rand_arg(-1, 9);     // |x| in [0.5, 1024)
            1: a = rand_arg(-30, 0);    // small arguments, Taylor-only region
            2: a = rand_arg(-62, -20);  // tiny arguments
            default: a = rand_arg(3, 9);
          endcase
          in_valid <= 1'b1;
          x        <= a;
          xq.push_back(a);
          @(posedge clk);
        end
        in_valid <= 1'b0;
      end
      begin
        cnt = 0; first = -1; last = -1; t0 = 0;
        while (cnt < NRAND) begin
          @(posedge clk);
          t0++;
          if (rst_n && out_valid) begin
            if (first < 0) first = t0;
            last = t0;
            cnt++;
          end
        end
      end
    join
    checks++;
    if (last - first + 1 != NRAND) begin
      failures++;
      $display("FAIL throughput: %0d results over %0d clocks", NRAND, last - first + 1);
    end
    repeat (5) @(posedge clk);
    checks++;
    if (xq.size() != 0) begin failures++; $display("FAIL %0d results missing", xq.size()); end
    $display("results equal to the reference: %0d", exact);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
