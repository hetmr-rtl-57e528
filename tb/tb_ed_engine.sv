// tb_ed_engine: self-checking test of the replicated string-distance engine
// (4 arrays, STRLEN 6, both modes). Random string pairs are packed into the
// interleaved row layout; rows are offered with random gaps (forcing array
// stalls) and results are taken with random back-pressure. Every 16-bit
// result is compared with a dynamic-programming model. A last run with rows
// always ready checks the batch time of 3*STRLEN+4 cycles.
`timescale 1ns/1ps
module tb_ed_engine;
  import hetmr_pkg::*;
  import ed_ref_pkg::*;

  localparam int NA = 4, SL = 6, IN_W = NA * 16, OUT_W = NA * 16;
  logic clk = 0, rst_n = 1;
  // a falling edge at 1 ns applies the asynchronous reset before the first clock
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  logic start;
  logic [31:0] num_batches;
  logic in_valid, out_ready;
  logic [IN_W-1:0] in_data;
  logic in_ready_l, in_ready_s, out_valid_l, out_valid_s, busy_l, busy_s, done_l, done_s;
  logic [OUT_W-1:0] out_l, out_s;
  logic [31:0] stall_l, stall_s;
  int checks = 0, failures = 0;

  ed_engine #(.NUM_ARRAYS(NA), .STRLEN(SL), .MODE(DIST_LEV)) u_lev (
    .clk, .rst_n, .start, .num_batches, .in_valid, .in_ready(in_ready_l), .in_data,
    .out_valid(out_valid_l), .out_ready, .out_data(out_l), .busy(busy_l), .done(done_l), .stall_cycles(stall_l));
  ed_engine #(.NUM_ARRAYS(NA), .STRLEN(SL), .MODE(DIST_SW)) u_sw (
    .clk, .rst_n, .start, .num_batches, .in_valid, .in_ready(in_ready_s), .in_data,
    .out_valid(out_valid_s), .out_ready, .out_data(out_s), .busy(busy_s), .done(done_s), .stall_cycles(stall_s));

  str_t sa [NA], ta [NA];

  function automatic logic [IN_W-1:0] row(input int k);
    logic [IN_W-1:0] r = '0;
    for (int p = 0; p < NA; p++) begin
      r[(2*p)*8 +: 8]   = (k < sa[p].size()) ? sa[p][k] : 8'h00;
      r[(2*p+1)*8 +: 8] = (k < ta[p].size()) ? ta[p][k] : 8'h00;
    end
    return r;
  endfunction

  task automatic run(input int batches, input bit gaps, output int cycles);
    int t0;
    @(negedge clk);
    num_batches = batches; start = 1;
    t0 = $time / 10;
    @(negedge clk);
    start = 0;
    for (int b = 0; b < batches; b++) begin
      for (int p = 0; p < NA; p++) begin
        sa[p] = rand_str(SL, 3);
        ta[p] = rand_str(SL, 3);
      end
      for (int k = 0; k < SL; k++) begin
        if (gaps) begin
          in_valid = 0;
          repeat ($urandom_range(3, 0)) @(negedge clk);
        end
        in_valid = 1; in_data = row(k);
        do @(posedge clk); while (!in_ready_l);
        if (!in_ready_s) begin failures++; $display("engines out of step"); end
        @(negedge clk);
        in_valid = 0;
      end
      // collect the result row
      out_ready = gaps ? 1'b0 : 1'b1;
      while (!(out_valid_l && out_valid_s)) @(negedge clk);
      if (gaps) begin
        repeat ($urandom_range(3, 0)) @(negedge clk);
        out_ready = 1;
      end
      for (int p = 0; p < NA; p++) begin
        checks += 2;
        if (32'($signed(out_l[p*16 +: 16])) != lev(sa[p], ta[p])) begin
          failures++;
          $display("batch %0d pair %0d LEV got %0d exp %0d", b, p, $signed(out_l[p*16 +: 16]), lev(sa[p], ta[p]));
        end
        if (32'($signed(out_s[p*16 +: 16])) != sw(sa[p], ta[p])) begin
          failures++;
          $display("batch %0d pair %0d SW got %0d exp %0d", b, p, $signed(out_s[p*16 +: 16]), sw(sa[p], ta[p]));
        end
      end
      @(negedge clk);
      out_ready = 0;
    end
    while (busy_l) @(negedge clk);
    cycles = $time / 10 - t0;
  endtask

  initial begin
    int cyc;
    start = 0; num_batches = 0; in_valid = 0; in_data = '0; out_ready = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(20, 1, cyc);
    checks++;
    if (stall_l == 0) begin failures++; $display("no stall happened"); end
    // timing run: rows ready in every injection slot, results taken at once
    fork
      run(3, 0, cyc);
    join
    checks += 2;
    if (stall_l != 0) begin failures++; $display("unexpected stalls %0d", stall_l); end
    // start edge, 3 batches of 3*SL+4 cycles, the engine goes idle at the next edge
    if (cyc != 3 * (3 * SL + 4) + 1) begin
      failures++; $display("batch timing: %0d cycles, expected %0d", cyc, 3 * (3 * SL + 4) + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
