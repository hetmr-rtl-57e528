// tb_combiner_object: self-checking test of the k2 combiner.
// After a clear, 2000 random pairs (keys from a small set so that equal keys
// follow each other often, with random idle cycles) are accumulated; a drain
// must then return, in key order and one per cycle, the sum per key kept by
// a plain associative-array model. The bypass must have been used, and a
// burst of identical keys checks the one-pair-per-cycle rate.
`timescale 1ns/1ps
module tb_combiner_object;
  localparam int KEYS = 64, VW = 32, KW = 6;
  logic clk = 0, rst_n = 1;
  // a falling edge at 1 ns applies the asynchronous reset before the first clock
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, clear, drain, out_valid, busy;
  logic [KW-1:0] in_key, out_key;
  logic [VW-1:0] in_val, out_val;
  logic [31:0] bypass_count;
  logic [VW-1:0] model [KEYS];
  int checks = 0, failures = 0;

  combiner_object #(.KEYS(KEYS), .VW(VW)) dut (.clk, .rst_n, .in_valid, .in_key, .in_val,
    .clear, .drain, .out_valid, .out_key, .out_val, .busy, .bypass_count);

  task automatic drain_and_check(input string tag);
    int seen;
    @(negedge clk); drain = 1; @(negedge clk); drain = 0;
    seen = 0;
    while (seen < KEYS) begin
      @(posedge clk); #1;
      if (out_valid) begin
        checks++;
        if (out_key != KW'(seen) || out_val != model[seen]) begin
          failures++;
          $display("%s key %0d: got key %0d val %0d exp %0d", tag, seen, out_key, out_val, model[seen]);
        end
        seen++;
      end
    end
    @(posedge clk); #1;
    checks++;
    if (busy || out_valid) begin failures++; $display("%s: still busy after drain", tag); end
  endtask

  initial begin
    in_valid = 0; in_key = 0; in_val = 0; clear = 0; drain = 0;
    foreach (model[k]) model[k] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    while (busy) @(negedge clk);
    drain_and_check("after clear");

    for (int n = 0; n < 2000; n++) begin
      in_valid = ($urandom_range(4, 0) != 0);
      in_key = KW'($urandom_range(7, 0) * 5);
      in_val = $urandom_range(1000, 0);
      if (in_valid) model[in_key] += in_val;
      @(negedge clk);
    end
    // burst of one key, one pair per cycle
    for (int n = 0; n < 50; n++) begin
      in_valid = 1; in_key = 3; in_val = n;
      model[3] += n;
      @(negedge clk);
    end
    in_valid = 0;
    repeat (3) @(negedge clk);
    drain_and_check("after accumulate");
    checks++;
    if (bypass_count < 49) begin failures++; $display("bypass used only %0d times", bypass_count); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
