// tb_dp_combiner: self-checking test of the data-parallel combiner.
// Eight lanes emit, in lock-step, the same key sequence (as map pipelines
// sharing a key set do), each lane with its own values and with random lanes
// idle. After the stream a drain must return, for every key, the sum over all
// lanes and cycles, as kept by a reference array in the testbench.
`timescale 1ns/1ps
module tb_dp_combiner;
  localparam int LANES = 8, KEYS = 32, VW = 32, KW = 5;
  logic clk = 0, rst_n = 1;
  // a falling edge at 1 ns applies the asynchronous reset before the first clock
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  logic [LANES-1:0] lane_valid;
  logic [KW-1:0] lane_key [LANES];
  logic [VW-1:0] lane_val [LANES];
  logic clear, drain, out_valid, busy;
  logic [KW-1:0] out_key;
  logic [VW-1:0] out_val;
  logic [31:0] bypass_count;
  logic [VW-1:0] model [KEYS];
  int checks = 0, failures = 0;

  dp_combiner #(.LANES(LANES), .KEYS(KEYS), .VW(VW)) dut (.clk, .rst_n, .lane_valid, .lane_key,
    .lane_val, .clear, .drain, .out_valid, .out_key, .out_val, .busy, .bypass_count);

  initial begin
    int seen;
    lane_valid = 0; clear = 0; drain = 0;
    foreach (lane_key[l]) begin lane_key[l] = 0; lane_val[l] = 0; end
    foreach (model[k]) model[k] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    while (busy) @(negedge clk);

    // pass over the key set four times (like iterations over dimensions),
    // then a stretch where the same key repeats
    for (int n = 0; n < 4 * KEYS + 20; n++) begin
      logic [KW-1:0] k;
      k = (n < 4 * KEYS) ? KW'(n % KEYS) : KW'(7);
      for (int l = 0; l < LANES; l++) begin
        lane_valid[l] = ($urandom_range(3, 0) != 0);
        lane_key[l] = k;
        lane_val[l] = $urandom_range(100000, 0);
        if (lane_valid[l]) model[k] += lane_val[l];
      end
      @(negedge clk);
    end
    lane_valid = 0;
    repeat (4) @(negedge clk);
    drain = 1; @(negedge clk); drain = 0;
    seen = 0;
    while (seen < KEYS) begin
      @(posedge clk); #1;
      if (out_valid) begin
        checks++;
        if (out_key != KW'(seen) || out_val != model[seen]) begin
          failures++;
          $display("key %0d: got key %0d val %0d exp %0d", seen, out_key, out_val, model[seen]);
        end
        seen++;
      end
    end
    checks++;
    if (bypass_count == 0) begin failures++; $display("bypass never used"); end
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
