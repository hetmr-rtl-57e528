// tb_workload_strmatch: string-match and similarity workloads through the
// whole FPGA design, in both distance modes.
//
// Article-title-like strings (one to three words from a small vocabulary,
// joined by '_', up to STRLEN characters) are paired either with a query
// word (string match) or with another title (similarity). The host model
// lays 4 batches of 8 pairs out in the interleaved format and runs them on
// two instances of the design, one computing Levenshtein distances and one
// Smith-Waterman scores, with an always-ready DRAM. Every result is checked
// against the dynamic-programming models, and the run time must stay within
// 3*STRLEN+4 cycles per batch plus a fixed start/finish allowance.
`timescale 1ns/1ps
module tb_workload_strmatch;
  import hetmr_pkg::*;
  import ed_ref_pkg::*;

  localparam int NA = 8, SL = 16, NB = 4, DATA_W = NA * 16;
  logic clk = 0, rst_n = 1;
  // a falling edge at 1 ns applies the asynchronous reset before the first clock
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  logic reg_we;
  logic [3:0] reg_addr;
  logic [31:0] reg_wdata;
  logic [31:0] rdata [2];
  logic irq [2];
  int checks = 0, failures = 0;

  string vocab [8] = '{"cat", "data", "map", "reduce", "fpga", "zebra", "a", "graph"};
  str_t sa [NB][NA], ta [NB][NA];

  for (genvar g = 0; g < 2; g++) begin : g_dut
    logic rq_v, rq_r, rs_v, wr_v, wr_r;
    logic [31:0] rq_a, wr_a, stalls, wraps, byp;
    logic [DATA_W-1:0] rs_d, wr_d;
    logic [3:0] lkey [4];
    logic [31:0] lval [4];
    logic ov, bsy;
    logic [3:0] ok;
    logic [31:0] oval;
    logic [31:0] wsb [2], wsw [2], w2a;
    logic [1:0] wsr;
    logic [63:0] wsd [2], w2d;
    logic wsbusy, wsdone, w2v;
    assign wsb = '{default: '0};
    assign wsw = '{default: '0};
    assign wsd = '{default: '0};
    assign lkey = '{default: '0};
    assign lval = '{default: '0};
    hetmr_fpga_top #(.NUM_ARRAYS(NA), .STRLEN(SL), .MODE(g == 0 ? DIST_LEV : DIST_SW),
                     .LANES(4), .KEYS(16), .WS_STREAMS(2)) dut (
      .clk, .rst_n, .reg_we, .reg_addr, .reg_wdata, .reg_rdata(rdata[g]), .irq(irq[g]),
      .dram_rd_req_valid(rq_v), .dram_rd_req_ready(rq_r), .dram_rd_req_addr(rq_a),
      .dram_rd_resp_valid(rs_v), .dram_rd_resp_data(rs_d),
      .dram_wr_valid(wr_v), .dram_wr_ready(wr_r), .dram_wr_addr(wr_a), .dram_wr_data(wr_d),
      .stall_cycles(stalls), .wrap_count(wraps),
      .cmb_lane_valid(4'b0), .cmb_lane_key(lkey), .cmb_lane_val(lval), .cmb_clear(1'b0),
      .cmb_drain(1'b0), .cmb_out_valid(ov), .cmb_out_key(ok), .cmb_out_val(oval),
      .cmb_busy(bsy), .cmb_bypass_count(byp),
      .ws_start(1'b0), .ws_base(wsb), .ws_words(wsw), .ws_valid(2'b0), .ws_ready(wsr),
      .ws_data(wsd), .ws_busy(wsbusy), .ws_done(wsdone),
      .dram2_wr_valid(w2v), .dram2_wr_ready(1'b1), .dram2_wr_addr(w2a), .dram2_wr_data(w2d));
    dram_model #(.W(DATA_W), .DEPTH(256), .LATENCY(5), .RAND_READY(0)) mem (
      .clk, .rd_req_valid(rq_v), .rd_req_ready(rq_r), .rd_req_addr(rq_a),
      .rd_resp_valid(rs_v), .rd_resp_data(rs_d),
      .wr_valid(wr_v), .wr_ready(wr_r), .wr_addr(wr_a), .wr_data(wr_d));
  end

  function automatic str_t title();
    string t;
    int words;
    t = "";
    words = $urandom_range(3, 1);
    for (int w = 0; w < words; w++) begin
      string v;
      v = vocab[$urandom_range(7, 0)];
      if (t.len() + v.len() + (w > 0) > SL) break;
      if (w > 0) t = {t, "_"};
      t = {t, v};
    end
    title = new[t.len()];
    foreach (title[k]) title[k] = t[k];
  endfunction

  function automatic str_t word();
    string v;
    v = vocab[$urandom_range(7, 0)];
    word = new[v.len()];
    foreach (word[k]) word[k] = v[k];
  endfunction

  task automatic reg_write(input reg_idx_e a, input logic [31:0] d);
    @(negedge clk); reg_we = 1; reg_addr = a; reg_wdata = d;
    @(negedge clk); reg_we = 0;
  endtask

  initial begin
    int cyc;
    reg_we = 0; reg_addr = 0; reg_wdata = 0;
    for (int b = 0; b < NB; b++)
      for (int p = 0; p < NA; p++) begin
        sa[b][p] = title();
        ta[b][p] = (b % 2 == 0) ? word() : title();   // even batches: string match
      end
    for (int b = 0; b < NB; b++)
      for (int k = 0; k < SL; k++) begin
        logic [DATA_W-1:0] r;
        r = '0;
        for (int p = 0; p < NA; p++) begin
          r[(2*p)*8 +: 8]   = (k < sa[b][p].size()) ? sa[b][p][k] : 8'h00;
          r[(2*p+1)*8 +: 8] = (k < ta[b][p].size()) ? ta[b][p][k] : 8'h00;
        end
        g_dut[0].mem.mem[b * SL + k] = r;
        g_dut[1].mem.mem[b * SL + k] = r;
      end
    repeat (3) @(negedge clk);
    rst_n = 1;
    reg_write(REG_RD_BASE, 0);
    reg_write(REG_RD_WORDS, NB * SL);
    reg_write(REG_RD_ITERS, 1);
    reg_write(REG_WR_BASE, 128);
    reg_write(REG_WR_WORDS, NB);
    reg_write(REG_JOB_PARAM, NB);
    reg_write(REG_CTRL, 1);
    cyc = 0;
    while (!(irq[0] && irq[1])) begin @(negedge clk); cyc++; end
    for (int b = 0; b < NB; b++)
      for (int p = 0; p < NA; p++) begin
        logic [DATA_W-1:0] r0, r1;
        int el, es;
        r0 = g_dut[0].mem.mem[128 + b];
        r1 = g_dut[1].mem.mem[128 + b];
        el = lev(sa[b][p], ta[b][p]);
        es = sw(sa[b][p], ta[b][p]);
        checks += 2;
        if (32'($signed(r0[p*16 +: 16])) != el) begin
          failures++; $display("LEV batch %0d pair %0d: %0d expected %0d", b, p, $signed(r0[p*16 +: 16]), el);
        end
        if (32'($signed(r1[p*16 +: 16])) != es) begin
          failures++; $display("SW batch %0d pair %0d: %0d expected %0d", b, p, $signed(r1[p*16 +: 16]), es);
        end
      end
    checks++;
    $display("%0d batches of %0d pairs in %0d cycles (%0d per batch at full rate)", NB, NA, cyc, 3 * SL + 4);
    if (cyc > NB * (3 * SL + 4) + 20) begin failures++; $display("too slow"); end
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
