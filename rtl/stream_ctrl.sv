// stream_ctrl: moves a job of n_vec 128-bit vectors from the source memory through
// the exp() lanes into the destination memory.
//
// On start (while idle) it latches the job and issues one source read per clock at
// src_base, src_base+1, ... until n_vec reads are out. Each returned word
// (mem0_rvalid) is registered and split into LANES 64-bit arguments, lane i taking
// bits [64*i +: 64], all lanes marked valid together. Results come back from the
// lanes in order; when they are valid, lane i's result is placed in bits [64*i +: 64]
// of the write word, which is written to dst_base, dst_base+1, ... in the next clock.
// When the n_vec-th word is written, done pulses for one clock and busy falls.
// The lanes never stall, so no flow control is needed: one vector per clock in and out.
// The read-split-compute-concatenate-write flow follows the platform description; the
// start/done handshake, the addressing and the use of a read-valid strobe are this
// implementation's (the memory controllers belong to the platform).
module stream_ctrl #(
  parameter int unsigned LANES  = 2,
  parameter int unsigned ADDR_W = 20
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // job control
  input  logic                     start,
  input  logic [ADDR_W:0]          n_vec,
  input  logic [ADDR_W-1:0]        src_base,
  input  logic [ADDR_W-1:0]        dst_base,
  output logic                     busy,
  output logic                     done,
  // source memory read port
  output logic                     mem0_re,
  output logic [ADDR_W-1:0]        mem0_addr,
  input  logic                     mem0_rvalid,
  input  logic [64*LANES-1:0]      mem0_rdata,
  // exp() lanes
  output logic                     lane_valid,
  output logic [LANES-1:0][63:0]   lane_x,
  input  logic [LANES-1:0]         res_valid,
  input  logic [LANES-1:0][63:0]   res_y,
  // destination memory write port
  output logic                     mem1_we,
  output logic [ADDR_W-1:0]        mem1_addr,
  output logic [64*LANES-1:0]      mem1_wdata
);
  logic [ADDR_W:0]   rd_left, wr_left;
  logic [ADDR_W-1:0] rd_addr, wr_addr;

  assign mem0_re   = busy && (rd_left != '0);
  assign mem0_addr = rd_addr;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      done       <= 1'b0;
      rd_left    <= '0;
      wr_left    <= '0;
      rd_addr    <= '0;
      wr_addr    <= '0;
      lane_valid <= 1'b0;
      mem1_we    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start && n_vec != '0) begin
          busy    <= 1'b1;
          rd_left <= n_vec;
          wr_left <= n_vec;
          rd_addr <= src_base;
          wr_addr <= dst_base;
        end
      end else begin
        if (mem0_re) begin
          rd_left <= rd_left - 1'b1;
          rd_addr <= rd_addr + 1'b1;
        end
        if (mem1_we) begin
          wr_left <= wr_left - 1'b1;
          wr_addr <= wr_addr + 1'b1;
          if (wr_left == (ADDR_W+1)'(1)) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
      lane_valid <= mem0_rvalid && busy;   // words only arrive for reads of this job
      mem1_we    <= res_valid[0];
    end
  end

  // data registers: split on the way in, concatenate on the way out
  always_ff @(posedge clk) begin
    for (int i = 0; i < LANES; i++) begin
      lane_x[i]                <= mem0_rdata[64*i +: 64];
      mem1_wdata[64*i +: 64]   <= res_y[i];
    end
  end
  assign mem1_addr = wr_addr;

  // all lanes run in lock step
  assert property (@(posedge clk) disable iff (!rst_n) (res_valid == '0) || (res_valid == '1))
    else $error("exp() lanes out of step");
  // results only while a job is running
  assert property (@(posedge clk) disable iff (!rst_n) mem1_we |-> busy)
    else $error("write outside a job");
endmodule
