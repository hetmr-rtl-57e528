// tb_kernel_ctrl: self-checking test of the executor control registers.
// Writes and reads back every configuration register, starts a run and
// checks the single start pulse, the ELAPSED count and the interrupt when
// the output kernel reports its last word; then checks the cycle-budget
// timeout, the interrupt clear and that start is ignored during a run.
`timescale 1ns/1ps
module tb_kernel_ctrl;
  import hetmr_pkg::*;
  logic clk = 0, rst_n = 1;
  // a falling edge at 1 ns applies the asynchronous reset before the first clock
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  logic reg_we, start, wr_done, irq, running;
  logic [3:0] reg_addr;
  logic [31:0] reg_wdata, reg_rdata, rd_base, rd_words, rd_iters, wr_base, wr_words, job_param;
  int checks = 0, failures = 0, starts = 0;

  kernel_ctrl dut (.clk, .rst_n, .reg_we, .reg_addr, .reg_wdata, .reg_rdata, .start,
    .rd_base, .rd_words, .rd_iters, .wr_base, .wr_words, .job_param, .wr_done, .irq, .running);

  always @(posedge clk) if (start) starts++;

  task automatic wr(input reg_idx_e a, input logic [31:0] d);
    @(negedge clk); reg_we = 1; reg_addr = a; reg_wdata = d;
    @(negedge clk); reg_we = 0;
  endtask
  task automatic expect_reg(input reg_idx_e a, input logic [31:0] d, input string what);
    reg_addr = a; #1;
    checks++;
    if (reg_rdata !== d) begin failures++; $display("%s: %h expected %h", what, reg_rdata, d); end
  endtask
  task automatic expect_bit(input logic v, input logic e, input string what);
    checks++;
    if (v !== e) begin failures++; $display("%s: %b expected %b", what, v, e); end
  endtask

  initial begin
    reg_we = 0; reg_addr = 0; reg_wdata = 0; wr_done = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    wr(REG_RD_BASE, 32'h100); wr(REG_RD_WORDS, 64); wr(REG_RD_ITERS, 3);
    wr(REG_WR_BASE, 32'h900); wr(REG_WR_WORDS, 2); wr(REG_JOB_PARAM, 6); wr(REG_CYCLES, 0);
    expect_reg(REG_RD_BASE, 32'h100, "RD_BASE");   expect_reg(REG_RD_WORDS, 64, "RD_WORDS");
    expect_reg(REG_RD_ITERS, 3, "RD_ITERS");       expect_reg(REG_WR_BASE, 32'h900, "WR_BASE");
    expect_reg(REG_WR_WORDS, 2, "WR_WORDS");       expect_reg(REG_JOB_PARAM, 6, "JOB_PARAM");
    expect_bit(rd_base == 32'h100 && rd_words == 64 && rd_iters == 3 && wr_base == 32'h900
               && wr_words == 2 && job_param == 6, 1'b1, "config outputs");
    expect_reg(REG_STATUS, 0, "STATUS idle");

    // run ending on wr_done after 20 cycles
    wr(REG_CTRL, 1);
    expect_bit(running, 1'b1, "running");
    repeat (19) @(negedge clk);
    wr(REG_CTRL, 1);                       // ignored: already running
    wr_done = 1; @(negedge clk); wr_done = 0;
    expect_bit(starts == 1, 1'b1, "one start pulse");
    expect_bit(irq, 1'b1, "irq after wr_done");
    expect_reg(REG_STATUS, 32'b1010, "STATUS done+irq");
    expect_reg(REG_ELAPSED, 22, "ELAPSED");
    wr(REG_CTRL, 2);
    expect_bit(irq, 1'b0, "irq cleared");
    expect_reg(REG_STATUS, 0, "STATUS cleared");

    // run ending on the cycle budget
    wr(REG_CYCLES, 10);
    wr(REG_CTRL, 1);
    repeat (15) @(negedge clk);
    expect_bit(starts == 2, 1'b1, "second start");
    expect_reg(REG_STATUS, 32'b1100, "STATUS timeout+irq");
    expect_reg(REG_ELAPSED, 10, "ELAPSED at timeout");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
