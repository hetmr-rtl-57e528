// tb_hetmr_full: end-to-end test of the FPGA design at its default size
// (96 arrays of 129 processors, 64-character strings, 8 combiner lanes,
// 1024 keys, 16 write streams), one 96-pair batch read twice. Otherwise as
// tb_hetmr_fpga_top.
//
// The testbench plays the host executor. It lays out NB batches of random
// string pairs in the interleaved row format in a DRAM model with random
// back-pressure, programs the control registers (input section read twice
// through the circular read kernel, so 2*NB batches are computed), starts
// the kernel and waits for the interrupt. Every result row written back to
// DRAM is compared with a dynamic-programming Levenshtein model. A second
// run with a too-small cycle budget must end in a timeout interrupt. The
// data-parallel combiner beside the string kernel is fed lock-step lanes and
// drained, and its sums are checked. The per-pipeline write streams write
// their regions of a second memory at the same time. Each mechanism must
// occur at least once: array stall on a late row, circular wrap of the read
// address, write back-pressure, combiner bypass, timeout, and two write
// streams taking words in the same cycle.
`timescale 1ns/1ps
module tb_hetmr_full;
  import hetmr_pkg::*;
  import ed_ref_pkg::*;

  localparam int NA = 96, SL = 64, NB = 1, LANES = 8, KEYS = 1024, WSS = 16;  // the design's defaults
  localparam int DATA_W = NA * 16, KW = $clog2(KEYS), VW = 32;
  localparam int RD_BASE = 8, WR_BASE = 200, WS_W = 64;

  logic clk = 0, rst_n = 1;
  // a falling edge at 1 ns applies the asynchronous reset before the first clock
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  logic reg_we, irq;
  logic [3:0] reg_addr;
  logic [31:0] reg_wdata, reg_rdata, stall_cycles, wrap_count, bypass_count;
  logic rq_v, rq_r, rs_v, wr_v, wr_r;
  logic [31:0] rq_a, wr_a;
  logic [DATA_W-1:0] rs_d, wr_d;
  logic [LANES-1:0] lane_valid;
  logic [KW-1:0] lane_key [LANES];
  logic [VW-1:0] lane_val [LANES];
  logic cmb_clear, cmb_drain, cmb_out_valid, cmb_busy;
  logic [KW-1:0] cmb_out_key;
  logic [VW-1:0] cmb_out_val;
  int checks = 0, failures = 0, wr_stalls = 0, timeouts = 0, ws_contended = 0;
  logic ws_start, ws_busy, ws_done, w2_v, w2_r;
  logic [31:0] ws_base [WSS], ws_words [WSS], w2_a;
  logic [WSS-1:0] ws_valid, ws_ready;
  logic [WS_W-1:0] ws_data [WSS], w2_d;

  hetmr_fpga_top dut (
    .clk, .rst_n, .reg_we, .reg_addr, .reg_wdata, .reg_rdata, .irq,
    .dram_rd_req_valid(rq_v), .dram_rd_req_ready(rq_r), .dram_rd_req_addr(rq_a),
    .dram_rd_resp_valid(rs_v), .dram_rd_resp_data(rs_d),
    .dram_wr_valid(wr_v), .dram_wr_ready(wr_r), .dram_wr_addr(wr_a), .dram_wr_data(wr_d),
    .stall_cycles, .wrap_count,
    .cmb_lane_valid(lane_valid), .cmb_lane_key(lane_key), .cmb_lane_val(lane_val),
    .cmb_clear, .cmb_drain, .cmb_out_valid, .cmb_out_key, .cmb_out_val,
    .cmb_busy, .cmb_bypass_count(bypass_count),
    .ws_start, .ws_base, .ws_words, .ws_valid, .ws_ready, .ws_data, .ws_busy, .ws_done,
    .dram2_wr_valid(w2_v), .dram2_wr_ready(w2_r), .dram2_wr_addr(w2_a), .dram2_wr_data(w2_d));

  dram_model #(.W(WS_W), .DEPTH(32 * WSS), .LATENCY(2), .RAND_READY(1)) mem2 (
    .clk, .rd_req_valid(1'b0), .rd_req_ready(), .rd_req_addr('0),
    .rd_resp_valid(), .rd_resp_data(),
    .wr_valid(w2_v), .wr_ready(w2_r), .wr_addr(w2_a), .wr_data(w2_d));

  always @(posedge clk) if ($countones(ws_valid & ws_ready) > 1 && w2_v) ws_contended++;

  dram_model #(.W(DATA_W), .DEPTH(512), .LATENCY(6), .RAND_READY(1)) mem (
    .clk, .rd_req_valid(rq_v), .rd_req_ready(rq_r), .rd_req_addr(rq_a),
    .rd_resp_valid(rs_v), .rd_resp_data(rs_d),
    .wr_valid(wr_v), .wr_ready(wr_r), .wr_addr(wr_a), .wr_data(wr_d));

  always @(posedge clk) if (wr_v && !wr_r) wr_stalls++;

  str_t sa [NB][NA], ta [NB][NA];

  task automatic reg_write(input reg_idx_e a, input logic [31:0] d);
    @(negedge clk); reg_we = 1; reg_addr = a; reg_wdata = d;
    @(negedge clk); reg_we = 0;
  endtask

  task automatic run_strings();
    int cyc;
    // host side: transform the pairs into the interleaved layout
    for (int b = 0; b < NB; b++)
      for (int k = 0; k < SL; k++) begin
        logic [DATA_W-1:0] r = '0;
        for (int p = 0; p < NA; p++) begin
          if (k == 0) begin
            sa[b][p] = rand_str(SL, 4);
            ta[b][p] = rand_str(SL, 4);
          end
          r[(2*p)*8 +: 8]   = (k < sa[b][p].size()) ? sa[b][p][k] : 8'h00;
          r[(2*p+1)*8 +: 8] = (k < ta[b][p].size()) ? ta[b][p][k] : 8'h00;
        end
        mem.mem[RD_BASE + b * SL + k] = r;
      end
    for (int a = WR_BASE; a < WR_BASE + 2 * NB + 2; a++) mem.mem[a] = '1;
    reg_write(REG_RD_BASE, RD_BASE);
    reg_write(REG_RD_WORDS, NB * SL);
    reg_write(REG_RD_ITERS, 2);
    reg_write(REG_WR_BASE, WR_BASE);
    reg_write(REG_WR_WORDS, 2 * NB);
    reg_write(REG_JOB_PARAM, 2 * NB);
    reg_write(REG_CYCLES, 0);
    reg_write(REG_CTRL, 1);
    cyc = 0;
    while (!irq) begin @(negedge clk); cyc++; end
    reg_addr = REG_STATUS; #1;
    checks++;
    if (reg_rdata[2:0] != 3'b010) begin failures++; $display("status %b after run", reg_rdata[3:0]); end
    for (int n = 0; n < 2 * NB; n++) begin
      logic [DATA_W-1:0] row = mem.mem[WR_BASE + n];
      for (int p = 0; p < NA; p++) begin
        int e = lev(sa[n % NB][p], ta[n % NB][p]);
        checks++;
        if (32'($signed(row[p*16 +: 16])) != e) begin
          failures++; $display("result row %0d pair %0d: %0d expected %0d", n, p, $signed(row[p*16 +: 16]), e);
        end
      end
    end
    checks++;
    if (&mem.mem[WR_BASE + 2 * NB] != 1'b1) begin failures++; $display("write past the end"); end
    $display("string run: %0d cycles for %0d batches", cyc, 2 * NB);
    reg_write(REG_CTRL, 2);

    // a run with too small a budget
    reg_write(REG_CYCLES, 20);
    reg_write(REG_CTRL, 1);
    while (!irq) @(negedge clk);
    reg_addr = REG_STATUS; #1;
    if (reg_rdata[2]) timeouts++;
    // let the abandoned run finish before going on
    repeat (2 * NB * (3 * SL + 4) * 8) @(negedge clk);
    reg_write(REG_CTRL, 2);
  endtask

  task automatic run_combiner();
    logic [VW-1:0] model [KEYS];
    int seen;
    foreach (model[k]) model[k] = 0;
    @(negedge clk); cmb_clear = 1; @(negedge clk); cmb_clear = 0;
    while (cmb_busy) @(negedge clk);
    for (int n = 0; n < 3 * KEYS + 6; n++) begin
      logic [KW-1:0] k = (n < 3 * KEYS) ? KW'(n % KEYS) : KW'(2);
      for (int l = 0; l < LANES; l++) begin
        lane_valid[l] = ($urandom_range(3, 0) != 0);
        lane_key[l] = k;
        lane_val[l] = $urandom_range(5000, 0);
        if (lane_valid[l]) model[k] += lane_val[l];
      end
      @(negedge clk);
    end
    lane_valid = '0;
    repeat (4) @(negedge clk);
    cmb_drain = 1; @(negedge clk); cmb_drain = 0;
    seen = 0;
    while (seen < KEYS) begin
      @(posedge clk); #1;
      if (cmb_out_valid) begin
        checks++;
        if (cmb_out_val != model[seen] || cmb_out_key != KW'(seen)) begin
          failures++; $display("combiner key %0d: %0d expected %0d", seen, cmb_out_val, model[seen]);
        end
        seen++;
      end
    end
  endtask

  // per-pipeline write streams: stream s writes 3+s words to words 32*s...
  task automatic run_streams();
    int sent [WSS];
    bit all;
    foreach (sent[s]) sent[s] = 0;
    for (int a = 0; a < 32 * WSS; a++) mem2.mem[a] = '1;
    for (int s = 0; s < WSS; s++) begin ws_base[s] = 32 * s; ws_words[s] = 3 + s; end
    @(negedge clk); ws_start = 1; @(negedge clk); ws_start = 0;
    do begin
      for (int s = 0; s < WSS; s++) begin
        if (!ws_valid[s] && sent[s] < 3 + s) ws_valid[s] = ($urandom_range(1, 0) == 0);
        ws_data[s] = {32'(s), 32'(sent[s])};
      end
      @(posedge clk);
      for (int s = 0; s < WSS; s++) if (ws_valid[s] && ws_ready[s]) sent[s]++;
      @(negedge clk);
      all = 1;
      for (int s = 0; s < WSS; s++) begin
        if (sent[s] >= 3 + s) ws_valid[s] = 0;
        else all = 0;
      end
    end while (!all);
    while (ws_busy) @(negedge clk);
    for (int a = 0; a < 32 * WSS; a++) begin
      logic [WS_W-1:0] e = (a % 32 < 3 + a / 32) ? {32'(a / 32), 32'(a % 32)} : '1;
      checks++;
      if (mem2.mem[a] != e) begin failures++; $display("stream word %0d: %h expected %h", a, mem2.mem[a], e); end
    end
  endtask

  initial begin
    ws_start = 0; ws_valid = '0;
    foreach (ws_data[s]) begin ws_data[s] = '0; ws_base[s] = '0; ws_words[s] = '0; end
    reg_we = 0; reg_addr = 0; reg_wdata = 0; lane_valid = '0; cmb_clear = 0; cmb_drain = 0;
    foreach (lane_key[l]) begin lane_key[l] = 0; lane_val[l] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      run_strings();
      run_combiner();
      run_streams();
    join
    $display("mechanisms: stall_cycles=%0d wraps=%0d write_backpressure=%0d bypass=%0d timeouts=%0d stream_contention=%0d",
             stall_cycles, wrap_count, wr_stalls, bypass_count, timeouts, ws_contended);
    checks += 6;
    if (ws_contended == 0) begin failures++; $display("write streams never competed"); end
    if (stall_cycles == 0) begin failures++; $display("no array stall happened"); end
    if (wrap_count == 0)   begin failures++; $display("no circular wrap happened"); end
    if (wr_stalls == 0)    begin failures++; $display("no write back-pressure happened"); end
    if (bypass_count == 0) begin failures++; $display("no combiner bypass happened"); end
    if (timeouts == 0)     begin failures++; $display("no timeout happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
