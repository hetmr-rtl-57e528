// tb_mem_wr_streams: self-checking test of the per-pipeline write streams.
// Four pipelines offer different numbers of words at random moments (a word
// once offered stays offered), into a DRAM model with random write
// back-pressure. Each region must hold exactly its stream's words in order,
// memory outside the regions must be untouched, done must pulse once after
// the last write, and the arbiter must have had to choose between streams.
`timescale 1ns/1ps
module tb_mem_wr_streams;
  localparam int S = 4, W = 32;
  localparam int N [S] = '{9, 1, 14, 6};
  localparam int B [S] = '{4, 20, 30, 50};
  logic clk = 0, rst_n = 1;
  // a falling edge at 1 ns applies the asynchronous reset before the first clock
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  logic start, wr_valid, wr_ready, busy, done;
  logic [31:0] base [S], num [S], wr_addr;
  logic [S-1:0] in_valid, in_ready;
  logic [W-1:0] in_data [S], wr_data;
  int checks = 0, failures = 0, dones = 0, contended = 0, writes = 0;
  int sent [S];

  mem_wr_streams #(.STREAMS(S), .DATA_W(W)) dut (.clk, .rst_n, .start, .base_addr(base),
    .num_words(num), .in_valid, .in_ready, .in_data, .wr_valid, .wr_ready, .wr_addr, .wr_data,
    .busy, .done);

  dram_model #(.W(W), .DEPTH(64), .RAND_READY(1)) mem (
    .clk, .rd_req_valid(1'b0), .rd_req_ready(), .rd_req_addr('0), .rd_resp_valid(), .rd_resp_data(),
    .wr_valid, .wr_ready, .wr_addr, .wr_data);

  always @(posedge clk) begin
    if (done) begin
      dones++;
      checks++;
      if (writes != 30) begin failures++; $display("done after %0d writes", writes); end
    end
    if (wr_valid && wr_ready) writes++;
    if ($countones(dut.req) > 1) contended++;
  end

  initial begin
    bit all;
    start = 0; in_valid = '0;
    foreach (base[s]) begin base[s] = B[s]; num[s] = N[s]; in_data[s] = 0; sent[s] = 0; end
    for (int a = 0; a < 64; a++) mem.mem[a] = 32'hDEADBEEF;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    do begin
      for (int s = 0; s < S; s++) begin
        if (!in_valid[s] && sent[s] < N[s]) in_valid[s] = ($urandom_range(2, 0) == 0) || s == 2;
        in_data[s] = 32'(s << 16 | sent[s]);
      end
      @(posedge clk);
      for (int s = 0; s < S; s++) if (in_valid[s] && in_ready[s]) sent[s]++;
      @(negedge clk);
      all = 1;
      for (int s = 0; s < S; s++) if (sent[s] < N[s]) all = 0;
      for (int s = 0; s < S; s++) if (sent[s] >= N[s]) in_valid[s] = 0;
    end while (!all);
    while (busy) @(negedge clk);
    repeat (2) @(negedge clk);
    for (int a = 0; a < 64; a++) begin
      logic [31:0] exp;
      exp = 32'hDEADBEEF;
      for (int s = 0; s < S; s++)
        if (a >= B[s] && a < B[s] + N[s]) exp = 32'(s << 16 | (a - B[s]));
      checks++;
      if (mem.mem[a] != exp) begin failures++; $display("mem[%0d]=%h exp %h", a, mem.mem[a], exp); end
    end
    checks += 2;
    if (dones != 1) begin failures++; $display("done pulsed %0d times", dones); end
    if (contended == 0) begin failures++; $display("arbiter never had to choose"); end
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
