// tb_exp_twin: end-to-end test of the twin exp() accelerator at its default sizes.
//
// Behavioural source and destination memories (128-bit words, fixed read latency
// RD_LAT) surround the design. Jobs of 1, 10, 100, 1000, 10000 and 50000 vectors
// (up to 100000 exp() evaluations, the largest vector size of the platform
// comparison) are run back to back. Every destination word is compared with the
// simulator's real-valued exp() of the two source doubles (at most one unit in the
// last place apart; below the normal range the result must be +0). The test also
// checks that each job takes n_vec + a fixed overhead clocks (one vector per clock),
// that done pulses once per job, that nothing is written outside the destination
// range, and counts how often each kind of argument was seen: negative (sign moved
// into the integer part), tiny (Taylor term only), NaN, overflow to +inf, underflow
// to +0 and both lanes carrying different values. A kind never seen is a failure.
module tb_exp_twin;
  localparam int ADDR_W = 20;
  localparam int RD_LAT = 3;
  // start to busy 1, read issue 1, read latency, lane register 1, exp() 30,
  // write register 1, done register 1, and the clock that sees done
  localparam int OVERHEAD = RD_LAT + 35;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  logic [ADDR_W:0]   n_vec = '0;
  logic [ADDR_W-1:0] src_base = '0, dst_base = '0;
  logic busy, done, mem0_re, mem0_rvalid, mem1_we;
  logic [ADDR_W-1:0] mem0_addr, mem1_addr;
  logic [127:0] mem0_rdata, mem1_wdata;

  int checks = 0, failures = 0;
  int n_neg = 0, n_tiny = 0, n_nan = 0, n_inf = 0, n_zero = 0, n_done = 0;

  exp_twin dut (.*);

  always #5 clk = ~clk;

  // ---------------- memories ----------------
  logic [127:0] mem0 [int];
  logic [127:0] mem1 [int];
  logic [RD_LAT-1:0] rv_pipe = '0;
  logic [127:0]      rd_pipe [RD_LAT];

  always @(posedge clk) begin
    rv_pipe <= rst_n ? {rv_pipe[RD_LAT-2:0], mem0_re} : '0;
    rd_pipe[0] <= mem0.exists(int'(mem0_addr)) ? mem0[int'(mem0_addr)] : '0;
    for (int i = 1; i < RD_LAT; i++) rd_pipe[i] <= rd_pipe[i-1];
    if (mem1_we) mem1[int'(mem1_addr)] = mem1_wdata;
    if (rst_n && done) n_done++;
  end
  assign mem0_rvalid = rv_pipe[RD_LAT-1];
  assign mem0_rdata  = rd_pipe[RD_LAT-1];

  // ---------------- reference ----------------
  function automatic logic [63:0] ref_exp(input logic [63:0] a);
    return $realtobits($exp($bitstoreal(a)));
  endfunction
  function automatic bit is_nan(input logic [63:0] a);
    return (a[62:52] == 11'h7FF) && (a[51:0] != 0);
  endfunction

  function automatic bit result_ok(input logic [63:0] a, input logic [63:0] got);
    logic [63:0] r;
    longint d;
    r = ref_exp(a);
    if (is_nan(a)) return is_nan(got) && !got[63];
    if (r < 64'h0010_0000_0000_0000) return (got == 64'h0) || (got == 64'h0010_0000_0000_0000);
    d = longint'(got) - longint'(r);
    return !got[63] && d >= -1 && d <= 1;
  endfunction

  function automatic logic [63:0] rand_arg(int i);
    logic [63:0] a;
    int e;
    case (i % 16)
      0:  return 64'h7FF8_0000_0000_0000 | 64'($urandom);     // NaN
      1:  e = 9;                                               // |x| 512..1024: overflow/underflow
      2, 3: e = -30 - int'($urandom % 30);                      // tiny
      default: e = int'($urandom % 16) - 6;
    endcase
    a = {1'($urandom & 1), 11'(1023 + e), $urandom, 20'($urandom)};
    return a;
  endfunction

  task automatic run_job(input int n, input int src, input int dst);
    int t, wr_before;
    for (int k = 0; k < n; k++)
      mem0[src + k] = {rand_arg(2*k + 1), rand_arg(2*k)};
    // mark the destination range and its neighbours as unwritten
    mem1.delete();
    n_vec    <= (ADDR_W+1)'(n);
    src_base <= ADDR_W'(src);
    dst_base <= ADDR_W'(dst);
    start    <= 1'b1;
    @(posedge clk);
    start    <= 1'b0;
    t = 1;
    wr_before = n_done;
    while (n_done == wr_before) begin @(posedge clk); t++; end
    checks++;
    if (t != n + OVERHEAD) begin
      failures++;
      $display("FAIL job of %0d vectors took %0d clocks", n, t);
    end
    // results
    checks++;
    if (mem1.size() != n) begin
      failures++;
      $display("FAIL job of %0d vectors wrote %0d words", n, mem1.size());
    end
    for (int k = 0; k < n; k++) begin
      logic [127:0] s, r;
      s = mem0[src + k];
      r = mem1.exists(dst + k) ? mem1[dst + k] : '1;
      for (int l = 0; l < 2; l++) begin
        logic [63:0] a, y;
        a = s[64*l +: 64];
        y = r[64*l +: 64];
        checks++;
        if (!result_ok(a, y)) begin
          failures++;
          if (failures < 20) $display("FAIL vec %0d lane %0d exp(%h) = %h, expected %h", k, l, a, y, ref_exp(a));
        end
        if (a[63] && !is_nan(a)) n_neg++;
        if (a[62:52] < 11'(1023 - 27)) n_tiny++;
        if (is_nan(a)) n_nan++;
        if (y == 64'h7FF0_0000_0000_0000) n_inf++;
        if (y == 64'h0) n_zero++;
      end
    end
    $display("job of %0d vectors: %0d clocks", n, t);
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sizes[6] = '{1, 10, 100, 1000, 10000, 50000};
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    for (int j = 0; j < 6; j++) begin
      run_job(sizes[j], 1000 * j, 200000 + 777 * j);
      repeat (2) @(posedge clk);
    end
    checks++;
    if (n_done != 6) begin failures++; $display("FAIL %0d done pulses", n_done); end
    $display("negative %0d, tiny %0d, NaN %0d, +inf %0d, +0 %0d", n_neg, n_tiny, n_nan, n_inf, n_zero);
    if (n_neg  == 0) begin failures++; $display("FAIL no negative argument"); end
    if (n_tiny == 0) begin failures++; $display("FAIL no tiny argument"); end
    if (n_nan  == 0) begin failures++; $display("FAIL no NaN"); end
    if (n_inf  == 0) begin failures++; $display("FAIL no overflow"); end
    if (n_zero == 0) begin failures++; $display("FAIL no underflow"); end
    checks += 5;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
