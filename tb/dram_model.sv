// dram_model: behavioural model of the FPGA board's DRAM for testbenches.
// Not synthesizable. One read port (request/response, in-order responses
// after LATENCY cycles, responses cannot be stalled) and one write port
// (valid/ready). Word addressed, DEPTH words of W bits. When RAND_READY is
// set, the request and write ready signals drop at random to exercise
// back-pressure. Testbenches load and inspect the array mem directly.
module dram_model #(
  parameter int ADDR_W     = 32,
  parameter int W          = 64,
  parameter int DEPTH      = 256,
  parameter int LATENCY    = 4,
  parameter bit RAND_READY = 1'b0
) (
  input  logic              clk,
  input  logic              rd_req_valid,
  output logic              rd_req_ready,
  input  logic [ADDR_W-1:0] rd_req_addr,
  output logic              rd_resp_valid,
  output logic [W-1:0]      rd_resp_data,
  input  logic              wr_valid,
  output logic              wr_ready,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [W-1:0]      wr_data
);
  logic [W-1:0] mem [DEPTH];
  logic         pipe_v [LATENCY];
  logic [W-1:0] pipe_d [LATENCY];
  int           reads = 0, writes = 0, not_ready_cycles = 0;

  initial begin
    foreach (pipe_v[k]) pipe_v[k] = 1'b0;
    foreach (pipe_d[k]) pipe_d[k] = '0;
    rd_req_ready = 1'b1;
    wr_ready     = 1'b1;
  end

  assign rd_resp_valid = pipe_v[LATENCY-1];
  assign rd_resp_data  = pipe_d[LATENCY-1];

  always @(posedge clk) begin
    for (int k = LATENCY - 1; k > 0; k--) begin
      pipe_v[k] <= pipe_v[k-1];
      pipe_d[k] <= pipe_d[k-1];
    end
    pipe_v[0] <= rd_req_valid && rd_req_ready;
    pipe_d[0] <= mem[rd_req_addr % DEPTH];
    if (rd_req_valid && rd_req_ready) reads++;
    if (wr_valid && wr_ready) begin
      mem[wr_addr % DEPTH] <= wr_data;
      writes++;
    end
    if (RAND_READY) begin
      rd_req_ready <= ($urandom_range(3, 0) != 0);
      wr_ready     <= ($urandom_range(3, 0) != 0);
      if (!rd_req_ready || !wr_ready) not_ready_cycles++;
    end
  end
endmodule
