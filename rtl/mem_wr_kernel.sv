// mem_wr_kernel: output memory kernel.
//
// Writes the computation kernel's output stream to consecutive words of
// on-board DRAM, starting at base_addr, and signals done when the last of
// num_words words has been accepted by the memory: the event the host waits
// for as the "last output byte written" interrupt. It holds no buffer: the
// kernel's valid/ready stream maps straight onto the DRAM write handshake,
// so a busy memory back-pressures the kernel. Words arriving while the
// kernel is not armed, or beyond num_words, are not accepted.
// Interface: start/base_addr/num_words arm it; in_* is the kernel stream;
// wr_valid/wr_ready/wr_addr/wr_data is the DRAM write port (word
// addresses). done is a one-cycle pulse.
module mem_wr_kernel #(
  parameter int ADDR_W = 32,
  parameter int DATA_W = 1536
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ADDR_W-1:0] base_addr,
  input  logic [31:0]       num_words,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [DATA_W-1:0] in_data,
  output logic              wr_valid,
  input  logic              wr_ready,
  output logic [ADDR_W-1:0] wr_addr,
  output logic [DATA_W-1:0] wr_data,
  output logic              busy,
  output logic              done
);

  logic [ADDR_W-1:0] addr_q;
  logic [31:0]       left_q;

  assign busy     = (left_q != 0);
  assign wr_valid = busy && in_valid;
  assign wr_addr  = addr_q;
  assign wr_data  = in_data;
  assign in_ready = busy && wr_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr_q <= '0;
      left_q <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        addr_q <= base_addr;
        left_q <= num_words;
        done   <= (num_words == 0);
      end else if (wr_valid && wr_ready) begin
        addr_q <= addr_q + 1'b1;
        left_q <= left_q - 1;
        if (left_q == 1) done <= 1'b1;
      end
    end
  end

  a_wr_hold: assert property (@(posedge clk) disable iff (!rst_n)
    wr_valid && !wr_ready |=> wr_valid && $stable(wr_addr))
    else $error("mem_wr_kernel: write request dropped");

endmodule
