// exp_twin: the twin exp() accelerator. Each clock one 128-bit word read from the
// source memory carries two IEEE doubles; each goes to its own exp() pipeline, and
// the two results, 30 clocks later, are written back as one 128-bit word to the
// destination memory. The pairing of two cores with one 128-bit memory word per
// clock follows the platform description (the memory interface is what limits the
// design to two cores); LANES may be raised for a wider memory path.
// Interface: a start/done job handshake (start while busy is low; done pulses once
// when the last word is written), a source read port with a read-valid strobe of any
// fixed or variable latency, and a destination write port. Word addresses are
// ADDR_W = 20 bits wide: 16 MB per memory bank in 16-byte words.
// Throughput: one vector (LANES results) per clock; latency from a read-valid word to
// its write is 1 + 30 + 1 clocks.
module exp_twin #(
  parameter int unsigned LANES  = 2,
  parameter int unsigned ADDR_W = 20
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [ADDR_W:0]      n_vec,
  input  logic [ADDR_W-1:0]    src_base,
  input  logic [ADDR_W-1:0]    dst_base,
  output logic                 busy,
  output logic                 done,
  output logic                 mem0_re,
  output logic [ADDR_W-1:0]    mem0_addr,
  input  logic                 mem0_rvalid,
  input  logic [64*LANES-1:0]  mem0_rdata,
  output logic                 mem1_we,
  output logic [ADDR_W-1:0]    mem1_addr,
  output logic [64*LANES-1:0]  mem1_wdata
);
  logic                   lane_valid;
  logic [LANES-1:0][63:0] lane_x, res_y;
  logic [LANES-1:0]       res_valid;

  stream_ctrl #(.LANES(LANES), .ADDR_W(ADDR_W)) u_ctrl (
    .clk, .rst_n, .start, .n_vec, .src_base, .dst_base, .busy, .done,
    .mem0_re, .mem0_addr, .mem0_rvalid, .mem0_rdata,
    .lane_valid, .lane_x, .res_valid, .res_y,
    .mem1_we, .mem1_addr, .mem1_wdata
  );

  for (genvar i = 0; i < LANES; i++) begin : g_lane
    exp_core u_exp (
      .clk, .rst_n,
      .in_valid (lane_valid),
      .x        (lane_x[i]),
      .out_valid(res_valid[i]),
      .y        (res_y[i])
    );
  end
endmodule
