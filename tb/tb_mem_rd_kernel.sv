// tb_mem_rd_kernel: self-checking test of the input memory kernel.
// A DRAM model with 4-cycle latency and random request back-pressure holds
// a known pattern. Run 1 reads a 7-word section at base 5 for 3 iterations
// with a randomly stalling consumer; the stream must repeat the section
// three times (circular access) and wrap_count must be 2. Run 2 streams 40
// words once with DRAM and consumer always ready and checks one word per
// cycle after the first. Run 3 checks that a zero-length request ends at
// once.
`timescale 1ns/1ps
module tb_mem_rd_kernel;
  localparam int W = 64;
  logic clk = 0, rst_n = 1;
  // a falling edge at 1 ns applies the asynchronous reset before the first clock
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  logic start, out_ready, busy, done;
  logic [31:0] base, words, iters, wrap_count;
  logic rq_v, rq_r, rs_v, out_valid;
  logic [31:0] rq_a;
  logic [W-1:0] rs_d, out_data;
  logic rq_r_rand, rq_r_fast, rs_v_rand, rs_v_fast;
  logic [W-1:0] rs_d_rand, rs_d_fast;
  bit fast;
  int checks = 0, failures = 0;

  mem_rd_kernel #(.ADDR_W(32), .DATA_W(W), .FIFO_DEPTH(8)) dut (
    .clk, .rst_n, .start, .base_addr(base), .section_words(words), .iterations(iters),
    .rd_req_valid(rq_v), .rd_req_ready(rq_r), .rd_req_addr(rq_a),
    .rd_resp_valid(rs_v), .rd_resp_data(rs_d),
    .out_valid, .out_ready, .out_data, .busy, .done, .wrap_count);

  // two memories with the same contents: one with random ready, one always ready
  dram_model #(.W(W), .DEPTH(64), .LATENCY(4), .RAND_READY(1)) m_rand (
    .clk, .rd_req_valid(rq_v && !fast), .rd_req_ready(rq_r_rand), .rd_req_addr(rq_a),
    .rd_resp_valid(rs_v_rand), .rd_resp_data(rs_d_rand),
    .wr_valid(1'b0), .wr_ready(), .wr_addr('0), .wr_data('0));
  dram_model #(.W(W), .DEPTH(64), .LATENCY(4), .RAND_READY(0)) m_fast (
    .clk, .rd_req_valid(rq_v && fast), .rd_req_ready(rq_r_fast), .rd_req_addr(rq_a),
    .rd_resp_valid(rs_v_fast), .rd_resp_data(rs_d_fast),
    .wr_valid(1'b0), .wr_ready(), .wr_addr('0), .wr_data('0));
  assign rq_r = fast ? rq_r_fast : rq_r_rand;
  assign rs_v = fast ? rs_v_fast : rs_v_rand;
  assign rs_d = fast ? rs_d_fast : rs_d_rand;

  function automatic logic [W-1:0] pat(input int a);
    return {32'hC0DE0000 | 32'(a), 32'(a * 2654435761)};
  endfunction

  task automatic go(input int b, input int w, input int it);
    @(negedge clk);
    base = b; words = w; iters = it; start = 1;
    @(negedge clk);
    start = 0;
  endtask

  initial begin
    int got, first_t, last_t;
    bit saw_done;
    start = 0; base = 0; words = 0; iters = 0; out_ready = 0; fast = 0;
    for (int a = 0; a < 64; a++) begin
      m_rand.mem[a] = pat(a);
      m_fast.mem[a] = pat(a);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;

    // run 1: circular access with back-pressure on both sides
    go(5, 7, 3);
    got = 0; saw_done = 0;
    while (got < 21) begin
      out_ready = ($urandom_range(2, 0) != 0);
      @(posedge clk);
      if (done) saw_done = 1;
      if (out_valid && out_ready) begin
        checks++;
        if (out_data != pat(5 + got % 7)) begin
          failures++; $display("run1 word %0d: got %h", got, out_data);
        end
        got++;
      end
      @(negedge clk);
    end
    out_ready = 0;
    repeat (2) @(posedge clk) if (done) saw_done = 1;
    checks += 3;
    if (!saw_done) begin failures++; $display("run1: no done"); end
    if (wrap_count != 2) begin failures++; $display("run1: wrap_count %0d", wrap_count); end
    if (busy || out_valid) begin failures++; $display("run1: extra data"); end

    // run 2: full rate
    fast = 1;
    @(negedge clk);
    out_ready = 1;
    go(10, 40, 1);
    got = 0; first_t = 0; last_t = 0;
    while (got < 40) begin
      @(posedge clk);
      if (out_valid) begin
        checks++;
        if (out_data != pat(10 + got)) begin failures++; $display("run2 word %0d bad", got); end
        if (got == 0) first_t = $time / 10;
        last_t = $time / 10;
        got++;
      end
    end
    checks++;
    if (last_t - first_t != 39) begin
      failures++; $display("run2: 40 words took %0d cycles", last_t - first_t + 1);
    end

    // run 3: nothing to read
    @(negedge clk);
    base = 0; words = 0; iters = 4; start = 1;
    @(posedge clk); #1;
    start = 0;
    checks++;
    if (!done || busy) begin failures++; $display("run3: empty request not finished"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
