// tb_mem_wr_kernel: self-checking test of the output memory kernel.
// A source offers 25 words with random gaps into a DRAM model whose write
// ready drops at random. Every word must land at base+index, nothing may be
// written outside the range, done must pulse exactly once, after the last
// write, and a word offered after the last one must not be accepted.
`timescale 1ns/1ps
module tb_mem_wr_kernel;
  localparam int W = 32, N = 25, BASE = 17;
  logic clk = 0, rst_n = 1;
  // a falling edge at 1 ns applies the asynchronous reset before the first clock
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  logic start, in_valid, in_ready, wr_valid, wr_ready, busy, done;
  logic [31:0] base, num, wr_addr;
  logic [W-1:0] in_data, wr_data;
  int checks = 0, failures = 0, dones = 0, writes = 0;

  mem_wr_kernel #(.ADDR_W(32), .DATA_W(W)) dut (
    .clk, .rst_n, .start, .base_addr(base), .num_words(num),
    .in_valid, .in_ready, .in_data, .wr_valid, .wr_ready, .wr_addr, .wr_data, .busy, .done);

  dram_model #(.W(W), .DEPTH(64), .RAND_READY(1)) mem (
    .clk, .rd_req_valid(1'b0), .rd_req_ready(), .rd_req_addr('0), .rd_resp_valid(), .rd_resp_data(),
    .wr_valid, .wr_ready, .wr_addr, .wr_data);

  always @(posedge clk) begin
    if (done) begin
      dones++;
      checks++;
      if (writes != N) begin failures++; $display("done after %0d writes", writes); end
    end
    if (wr_valid && wr_ready) writes++;
  end

  initial begin
    int sent;
    start = 0; base = 0; num = 0; in_valid = 0; in_data = 0;
    for (int a = 0; a < 64; a++) mem.mem[a] = 32'hDEADBEEF;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    base = BASE; num = N; start = 1;
    @(negedge clk);
    start = 0;
    sent = 0;
    while (sent < N) begin
      // a word once offered stays offered until it is taken
      if (!in_valid) in_valid = ($urandom_range(3, 0) != 0);
      in_data = 32'h1000 + 32'(sent);
      @(posedge clk);
      if (in_valid && in_ready) begin
        sent++;
        @(negedge clk);
        in_valid = 0;
      end else begin
        @(negedge clk);
      end
    end
    // one word too many
    in_valid = 1; in_data = 32'hBAD;
    repeat (5) begin
      @(posedge clk);
      checks++;
      if (in_ready) begin failures++; $display("extra word accepted"); end
      @(negedge clk);
    end
    in_valid = 0;
    for (int a = 0; a < 64; a++) begin
      logic [31:0] exp;
      exp = (a >= BASE && a < BASE + N) ? 32'h1000 + 32'(a - BASE) : 32'hDEADBEEF;
      checks++;
      if (mem.mem[a] != exp) begin failures++; $display("mem[%0d]=%h exp %h", a, mem.mem[a], exp); end
    end
    checks++;
    if (dones != 1) begin failures++; $display("done pulsed %0d times", dones); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
