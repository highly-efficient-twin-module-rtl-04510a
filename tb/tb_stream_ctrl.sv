// tb_stream_ctrl: checks the job controller with stand-in lanes.
// The lanes are modelled here as a 7-clock pipeline that inverts each 64-bit
// argument, so every destination word must be the bitwise inverse of its source
// word with the two halves kept in place. Behavioural memories with a read latency
// of 2 clocks surround the controller. Jobs of 1, 5 and 300 vectors check the
// addresses (nothing written outside the destination range), the order of the
// results, one read per clock, the job length and the single done pulse. A start
// while busy must be ignored.
module tb_stream_ctrl;
  localparam int LANES = 2, ADDR_W = 12, RD_LAT = 2, LANE_LAT = 7;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  logic [ADDR_W:0] n_vec = '0;
  logic [ADDR_W-1:0] src_base = '0, dst_base = '0;
  logic busy, done, mem0_re, mem0_rvalid, lane_valid, mem1_we;
  logic [ADDR_W-1:0] mem0_addr, mem1_addr;
  logic [64*LANES-1:0] mem0_rdata, mem1_wdata;
  logic [LANES-1:0][63:0] lane_x, res_y;
  logic [LANES-1:0] res_valid;
  int checks = 0, failures = 0, n_done = 0, n_reads = 0;

  stream_ctrl #(.LANES(LANES), .ADDR_W(ADDR_W)) dut (.*);
  always #5 clk = ~clk;

  // stand-in lanes
  logic [LANE_LAT-1:0] lv = '0;
  logic [LANES-1:0][63:0] ld [LANE_LAT];
  always @(posedge clk) begin
    lv <= rst_n ? {lv[LANE_LAT-2:0], lane_valid} : '0;
    ld[0] <= ~lane_x;
    for (int i = 1; i < LANE_LAT; i++) ld[i] <= ld[i-1];
  end
  assign res_valid = {LANES{lv[LANE_LAT-1]}};
  assign res_y     = ld[LANE_LAT-1];

  // memories
  logic [127:0] mem0 [int];
  logic [127:0] mem1 [int];
  logic [RD_LAT-1:0] rv = '0;
  logic [127:0] rd [RD_LAT];
  always @(posedge clk) begin
    rv <= rst_n ? {rv[RD_LAT-2:0], mem0_re} : '0;
    rd[0] <= mem0.exists(int'(mem0_addr)) ? mem0[int'(mem0_addr)] : '0;
    for (int i = 1; i < RD_LAT; i++) rd[i] <= rd[i-1];
    if (rst_n && mem1_we) mem1[int'(mem1_addr)] = mem1_wdata;
    if (rst_n && done) n_done++;
    if (rst_n && mem0_re) n_reads++;
  end
  assign mem0_rvalid = rv[RD_LAT-1];
  assign mem0_rdata  = rd[RD_LAT-1];

  task automatic job(input int n, input int src, input int dst);
    int t, d0, r0;
    for (int k = 0; k < n; k++) mem0[src + k] = {$urandom, $urandom, $urandom, $urandom};
    mem1.delete();
    d0 = n_done; r0 = n_reads;
    n_vec <= (ADDR_W+1)'(n); src_base <= ADDR_W'(src); dst_base <= ADDR_W'(dst);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    t = 1;
    while (n_done == d0) begin
      @(posedge clk);
      t++;
      if (t == 3) begin           // a second start while busy: ignored
        start <= 1'b1; src_base <= '0;
      end else start <= 1'b0;
    end
    // start to busy, RD_LAT, lane register, LANE_LAT, write register, done, observe
    checks++;
    if (t != n + RD_LAT + LANE_LAT + 5) begin
      failures++; $display("FAIL job %0d took %0d clocks", n, t);
    end
    checks++;
    if (n_reads - r0 != n || mem1.size() != n) begin
      failures++; $display("FAIL job %0d: %0d reads, %0d writes", n, n_reads - r0, mem1.size());
    end
    for (int k = 0; k < n; k++) begin
      checks++;
      if (!mem1.exists(dst + k) || mem1[dst + k] != ~mem0[src + k]) begin
        failures++;
        if (failures < 10) $display("FAIL job %0d word %0d", n, k);
      end
    end
    @(posedge clk);
    checks++;
    if (busy || n_done != d0 + 1) begin failures++; $display("FAIL busy/done after job %0d", n); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    job(1, 10, 100);
    job(5, 4000, 7);
    job(300, 123, 2000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
