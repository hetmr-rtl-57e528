// mem_wr_streams: output memory kernel with one DRAM write stream per
// pipeline.
//
// When the keys a map pipeline will emit cannot be known in advance, the
// pipelines cannot share an on-chip combiner without write conflicts.
// Instead each pipeline gets a write stream of its own: its own region of
// DRAM (base_addr[s], num_words[s]) and its own buffer, so that no pipeline
// ever waits for another one's address. The streams share one DRAM write
// port through a round-robin arbiter, one word per cycle. The number of
// streams is limited by the toolchain to 16, which is the default here.
// A stream per pipeline, the 16-stream limit and the buffering between the
// streams follow the design; the round-robin arbiter, the FIFO depth and
// the word width are this implementation's.
//
// Interface: start arms all streams with their region; in_*[s] are the
// pipeline streams (valid/ready); wr_* is the shared DRAM write port (word
// addresses). done pulses when every stream has written its num_words.
// grant_count[s] counts the words written for stream s.
module mem_wr_streams #(
  parameter int STREAMS    = 16,
  parameter int ADDR_W     = 32,
  parameter int DATA_W     = 64,
  parameter int FIFO_DEPTH = 4,
  localparam int SW        = (STREAMS > 1) ? $clog2(STREAMS) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [ADDR_W-1:0]  base_addr [STREAMS],
  input  logic [31:0]        num_words [STREAMS],
  input  logic [STREAMS-1:0] in_valid,
  output logic [STREAMS-1:0] in_ready,
  input  logic [DATA_W-1:0]  in_data [STREAMS],
  output logic               wr_valid,
  input  logic               wr_ready,
  output logic [ADDR_W-1:0]  wr_addr,
  output logic [DATA_W-1:0]  wr_data,
  output logic               busy,
  output logic               done
);

  logic [ADDR_W-1:0]  addr_q [STREAMS];
  logic [31:0]        left_q [STREAMS];
  logic [STREAMS-1:0] fifo_valid, req, pop, armed;
  logic [DATA_W-1:0]  fifo_data [STREAMS];
  logic [SW-1:0]      rr_q, grant;
  logic [31:0]        acc_q [STREAMS];   // words each stream may still accept
  logic [31:0]        total_q;           // words still to be written, all streams
  logic [31:0]        start_sum;         // sum of num_words, loaded at start
  logic               any_req, busy_q;

  for (genvar s = 0; s < STREAMS; s++) begin : g_s
    logic [$clog2(FIFO_DEPTH):0] cnt;
    logic                        f_ready;
    // a stream takes words only while it still has room in its region
    assign armed[s]    = (left_q[s] != 0);
    assign in_ready[s] = f_ready && (acc_q[s] != 0);
    fifo_sync #(.W(DATA_W), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n,
      .wr_valid(in_ready[s] && in_valid[s]), .wr_ready(f_ready), .wr_data(in_data[s]),
      .rd_valid(fifo_valid[s]), .rd_ready(pop[s]), .rd_data(fifo_data[s]),
      .count(cnt)
    );
    assign req[s] = fifo_valid[s] && armed[s];
  end

  // round-robin: first requesting stream after the last one granted
  always_comb begin
    any_req = 1'b0;
    grant   = rr_q;
    for (int k = 1; k <= STREAMS; k++) begin
      if (!any_req && req[(int'(rr_q) + k) % STREAMS]) begin
        any_req = 1'b1;
        grant   = SW'((int'(rr_q) + k) % STREAMS);
      end
    end
  end

  // total number of words of a job, summed over the streams
  always_comb begin
    start_sum = '0;
    for (int s = 0; s < STREAMS; s++) start_sum = start_sum + num_words[s];
  end

  assign wr_valid = any_req;
  assign wr_addr  = addr_q[grant];
  assign wr_data  = fifo_data[grant];
  always_comb begin
    pop = '0;
    if (any_req && wr_ready) pop[grant] = 1'b1;
  end

  assign busy = busy_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr_q    <= SW'(STREAMS - 1);
      busy_q  <= 1'b0;
      done    <= 1'b0;
      total_q <= '0;
      for (int s = 0; s < STREAMS; s++) begin
        addr_q[s] <= '0;
        left_q[s] <= '0;
        acc_q[s]  <= '0;
      end
    end else begin
      done <= 1'b0;
      if (start && !busy_q) begin
        for (int s = 0; s < STREAMS; s++) begin
          addr_q[s] <= base_addr[s];
          left_q[s] <= num_words[s];
          acc_q[s]  <= num_words[s];
        end
        total_q <= start_sum;
        busy_q  <= (start_sum != 0);
        done    <= (start_sum == 0);
      end else begin
        for (int s = 0; s < STREAMS; s++)
          if (in_valid[s] && in_ready[s]) acc_q[s] <= acc_q[s] - 1;
        if (any_req && wr_ready) begin
          rr_q          <= grant;
          addr_q[grant] <= addr_q[grant] + 1'b1;
          left_q[grant] <= left_q[grant] - 1;
          total_q       <= total_q - 1;
          if (total_q == 1) begin
            busy_q <= 1'b0;
            done   <= 1'b1;
          end
        end
      end
    end
  end

  a_wr_hold: assert property (@(posedge clk) disable iff (!rst_n)
    wr_valid && !wr_ready |=> wr_valid)
    else $error("mem_wr_streams: write request withdrawn");

endmodule
