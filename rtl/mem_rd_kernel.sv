// mem_rd_kernel: input memory kernel with circular access.
//
// Streams a section of on-board DRAM into a computation kernel. The executor
// sets base_addr (first word), section_words (words per pass) and iterations
// (passes) and pulses start. An address counter walks the section; a second,
// extra counter counts the words of the current pass and, at the end of the
// section, sends the address back to base_addr, so that iterative jobs
// re-read their data without the host restarting the kernel. The circular
// reset of the read address is the design's; the request/response protocol
// and the buffer are this implementation's.
//
// DRAM side: rd_req_valid/rd_req_ready/rd_req_addr issue word reads (address
// in DATA_W-bit words); rd_resp_valid/rd_resp_data return the data in order,
// after any latency, and cannot be stalled. A request is issued only while
// the FIFO has room for its data (credits = FIFO_DEPTH - stored - in flight),
// so responses are never lost. Kernel side: out_valid/out_ready/out_data.
// wrap_count counts the returns to base_addr. done pulses when the last word
// has left the FIFO. With a DRAM that answers every cycle and a ready kernel
// the kernel sustains one word per cycle.
module mem_rd_kernel #(
  parameter int ADDR_W     = 32,
  parameter int DATA_W     = 1536,
  parameter int FIFO_DEPTH = 16,
  localparam int CW        = $clog2(FIFO_DEPTH) + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ADDR_W-1:0] base_addr,
  input  logic [31:0]       section_words,
  input  logic [31:0]       iterations,
  output logic              rd_req_valid,
  input  logic              rd_req_ready,
  output logic [ADDR_W-1:0] rd_req_addr,
  input  logic              rd_resp_valid,
  input  logic [DATA_W-1:0] rd_resp_data,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [DATA_W-1:0] out_data,
  output logic              busy,
  output logic              done,
  output logic [31:0]       wrap_count
);

  logic              issuing_q;
  logic [ADDR_W-1:0] addr_q;
  logic [31:0]       word_q;        // word within the current pass
  logic [31:0]       iter_q;        // passes left to issue, counting this one
  logic [63:0]       left_q;        // words not yet delivered to the kernel
  logic [CW-1:0]     inflight_q;
  logic [CW-1:0]     fifo_count;
  logic              req_fire, out_fire, last_of_section, fifo_wr_ready;

  assign rd_req_valid    = issuing_q && ((fifo_count + inflight_q) < CW'(FIFO_DEPTH));
  assign rd_req_addr     = addr_q;
  assign req_fire        = rd_req_valid && rd_req_ready;
  assign out_fire        = out_valid && out_ready;
  assign last_of_section = (word_q == section_words - 1);
  assign busy            = issuing_q || (left_q != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issuing_q  <= 1'b0;
      addr_q     <= '0;
      word_q     <= '0;
      iter_q     <= '0;
      left_q     <= '0;
      inflight_q <= '0;
      wrap_count <= '0;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        addr_q     <= base_addr;
        word_q     <= '0;
        iter_q     <= iterations;
        left_q     <= 64'(section_words) * 64'(iterations);
        issuing_q  <= (section_words != 0) && (iterations != 0);
        wrap_count <= '0;
        done       <= (section_words == 0) || (iterations == 0);
      end else begin
        if (req_fire) begin
          if (last_of_section) begin
            // the extra counter: back to the start of the section
            addr_q <= base_addr;
            word_q <= '0;
            iter_q <= iter_q - 1;
            if (iter_q == 1) issuing_q <= 1'b0;
            else             wrap_count <= wrap_count + 1;
          end else begin
            addr_q <= addr_q + 1'b1;
            word_q <= word_q + 1;
          end
        end
        if (out_fire) begin
          left_q <= left_q - 1;
          if (left_q == 1) done <= 1'b1;
        end
      end
      inflight_q <= inflight_q + CW'(req_fire) - CW'(rd_resp_valid);
    end
  end

  fifo_sync #(.W(DATA_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .wr_valid(rd_resp_valid), .wr_ready(fifo_wr_ready), .wr_data(rd_resp_data),
    .rd_valid(out_valid), .rd_ready(out_ready), .rd_data(out_data),
    .count(fifo_count)
  );

  a_resp_expected: assert property (@(posedge clk) disable iff (!rst_n)
    rd_resp_valid |-> (inflight_q != '0) && fifo_wr_ready)
    else $error("mem_rd_kernel: response without request");
  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
    rd_req_valid && !rd_req_ready && !(start && !busy) |=> $stable(rd_req_addr))
    else $error("mem_rd_kernel: request address changed while waiting");

endmodule
