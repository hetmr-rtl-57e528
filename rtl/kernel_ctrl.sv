// kernel_ctrl: FPGA-side control registers of the executor interface.
//
// Before a run the host executor writes, over its register path, the start
// addresses and sizes of the input and output memory kernels, one static
// job parameter (for the string kernel: the number of 96-pair batches) and
// the number of cycles the run may take. Writing 1 to CTRL bit 0 emits a
// one-cycle start pulse to the memory kernels and the computation kernel
// and starts the ELAPSED counter. The run ends when the output memory kernel
// reports its last word written (wr_done): STATUS.done and the level
// interrupt irq are set. If CYCLES is non-zero and ELAPSED reaches it first,
// the run ends with STATUS.timeout and irq. Writing 1 to CTRL bit 1 clears
// irq, done and timeout. That the executor programs start addresses, sizes,
// cycle count and static parameters in registers, starts the kernel and
// waits for an interrupt follows the design; the register map (hetmr_pkg
// reg_idx_e) and the timeout are this implementation's.
// Register access: reg_we with reg_addr/reg_wdata writes in one cycle;
// reg_rdata is the combinational read of reg_addr.
module kernel_ctrl
  import hetmr_pkg::*;
#(
  parameter int ADDR_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              reg_we,
  input  logic [3:0]        reg_addr,
  input  logic [31:0]       reg_wdata,
  output logic [31:0]       reg_rdata,
  output logic              start,
  output logic [ADDR_W-1:0] rd_base,
  output logic [31:0]       rd_words,
  output logic [31:0]       rd_iters,
  output logic [ADDR_W-1:0] wr_base,
  output logic [31:0]       wr_words,
  output logic [31:0]       job_param,
  input  logic              wr_done,
  output logic              irq,
  output logic              running
);

  logic [31:0] cycles_q, elapsed_q;
  logic        done_q, timeout_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_base   <= '0;
      rd_words  <= '0;
      rd_iters  <= 32'd1;
      wr_base   <= '0;
      wr_words  <= '0;
      job_param <= '0;
      cycles_q  <= '0;
      elapsed_q <= '0;
      done_q    <= 1'b0;
      timeout_q <= 1'b0;
      irq       <= 1'b0;
      running   <= 1'b0;
      start     <= 1'b0;
    end else begin
      start <= 1'b0;
      if (running) begin
        elapsed_q <= elapsed_q + 1;
        if (wr_done) begin
          running <= 1'b0;
          done_q  <= 1'b1;
          irq     <= 1'b1;
        end else if (cycles_q != 0 && elapsed_q + 1 == cycles_q) begin
          running   <= 1'b0;
          timeout_q <= 1'b1;
          irq       <= 1'b1;
        end
      end
      if (reg_we) begin
        unique case (reg_idx_e'(reg_addr))
          REG_CTRL: begin
            if (reg_wdata[0] && !running) begin
              start     <= 1'b1;
              running   <= 1'b1;
              elapsed_q <= '0;
              done_q    <= 1'b0;
              timeout_q <= 1'b0;
            end
            if (reg_wdata[1]) begin
              irq       <= 1'b0;
              done_q    <= 1'b0;
              timeout_q <= 1'b0;
            end
          end
          REG_RD_BASE:   rd_base   <= ADDR_W'(reg_wdata);
          REG_RD_WORDS:  rd_words  <= reg_wdata;
          REG_RD_ITERS:  rd_iters  <= reg_wdata;
          REG_WR_BASE:   wr_base   <= ADDR_W'(reg_wdata);
          REG_WR_WORDS:  wr_words  <= reg_wdata;
          REG_JOB_PARAM: job_param <= reg_wdata;
          REG_CYCLES:    cycles_q  <= reg_wdata;
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (reg_idx_e'(reg_addr))
      REG_STATUS:    reg_rdata = {28'd0, irq, timeout_q, done_q, running};
      REG_RD_BASE:   reg_rdata = 32'(rd_base);
      REG_RD_WORDS:  reg_rdata = rd_words;
      REG_RD_ITERS:  reg_rdata = rd_iters;
      REG_WR_BASE:   reg_rdata = 32'(wr_base);
      REG_WR_WORDS:  reg_rdata = wr_words;
      REG_JOB_PARAM: reg_rdata = job_param;
      REG_CYCLES:    reg_rdata = cycles_q;
      REG_ELAPSED:   reg_rdata = elapsed_q;
      default:       reg_rdata = '0;
    endcase
  end

endmodule
