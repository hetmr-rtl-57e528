// hetmr_fpga_top: FPGA side of a hybrid MapReduce deployment.
//
// The string-distance reduce/map kernel (for similarity and string-match
// jobs) runs between two memory kernels, all programmed by the host
// executor through kernel_ctrl:
//
//   host regs -> kernel_ctrl --start/config--> mem_rd_kernel, ed_engine,
//                                              mem_wr_kernel
//   DRAM --rd--> mem_rd_kernel --rows--> ed_engine --results--> mem_wr_kernel
//        <--wr--------------------------------------------------'
//   mem_wr_kernel.done -> kernel_ctrl -> irq to host
//
// The host lays the string pairs out in DRAM in the interleaved row format
// (see ed_engine), writes RD_BASE/RD_WORDS/RD_ITERS, WR_BASE/WR_WORDS,
// JOB_PARAM (= batches = RD_WORDS*RD_ITERS/STRLEN) and CYCLES, sets CTRL.start
// and waits for irq; the result rows (NUM_ARRAYS x 16-bit) are then in DRAM.
//
// Beside it stands the data-parallel combiner (dp_combiner) used by
// map-intensive jobs whose pipelines emit a shared key set; the map
// pipelines that feed it are outside this design, so its lanes and its
// readout are ports (cmb_*). For map pipelines whose keys cannot be known in
// advance, mem_wr_streams gives each pipeline its own DRAM write stream
// instead (ws_*, on a second DRAM write port dram2_wr_*). Only one kernel of
// the library is loaded at a time on the real device; here all are present
// side by side.
//
// DRAM ports use word addresses; a word is NUM_ARRAYS*2 bytes (192 bytes at
// the default 96 arrays). Counters for the stall, circular-wrap and bypass
// mechanisms are brought out for observation.
module hetmr_fpga_top
  import hetmr_pkg::*;
#(
  parameter int         NUM_ARRAYS = 96,
  parameter int         STRLEN     = 64,
  parameter dist_mode_e MODE       = DIST_LEV,
  parameter int         ADDR_W     = 32,
  parameter int         FIFO_DEPTH = 16,
  parameter int         LANES      = 8,
  parameter int         KEYS       = 1024,
  parameter int         VW         = 32,
  parameter int         WS_STREAMS = 16,
  parameter int         WS_W       = 64,
  localparam int        DATA_W     = NUM_ARRAYS * 2 * 8,
  localparam int        RES_W      = NUM_ARRAYS * 16,
  localparam int        KW         = $clog2(KEYS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // host register access and interrupt
  input  logic              reg_we,
  input  logic [3:0]        reg_addr,
  input  logic [31:0]       reg_wdata,
  output logic [31:0]       reg_rdata,
  output logic              irq,
  // on-board DRAM, read side
  output logic              dram_rd_req_valid,
  input  logic              dram_rd_req_ready,
  output logic [ADDR_W-1:0] dram_rd_req_addr,
  input  logic              dram_rd_resp_valid,
  input  logic [DATA_W-1:0] dram_rd_resp_data,
  // on-board DRAM, write side
  output logic              dram_wr_valid,
  input  logic              dram_wr_ready,
  output logic [ADDR_W-1:0] dram_wr_addr,
  output logic [RES_W-1:0]  dram_wr_data,
  // observation counters
  output logic [31:0]       stall_cycles,
  output logic [31:0]       wrap_count,
  // data-parallel combiner
  input  logic [LANES-1:0]  cmb_lane_valid,
  input  logic [KW-1:0]     cmb_lane_key [LANES],
  input  logic [VW-1:0]     cmb_lane_val [LANES],
  input  logic              cmb_clear,
  input  logic              cmb_drain,
  output logic              cmb_out_valid,
  output logic [KW-1:0]     cmb_out_key,
  output logic [VW-1:0]     cmb_out_val,
  output logic              cmb_busy,
  output logic [31:0]       cmb_bypass_count,
  // per-pipeline write streams, with their own DRAM write port
  input  logic                  ws_start,
  input  logic [ADDR_W-1:0]     ws_base [WS_STREAMS],
  input  logic [31:0]           ws_words [WS_STREAMS],
  input  logic [WS_STREAMS-1:0] ws_valid,
  output logic [WS_STREAMS-1:0] ws_ready,
  input  logic [WS_W-1:0]       ws_data [WS_STREAMS],
  output logic                  ws_busy,
  output logic                  ws_done,
  output logic                  dram2_wr_valid,
  input  logic                  dram2_wr_ready,
  output logic [ADDR_W-1:0]     dram2_wr_addr,
  output logic [WS_W-1:0]       dram2_wr_data
);

  logic              start, running, wr_done, rd_busy, rd_done, eng_busy, eng_done, wr_busy;
  // rd_busy/rd_done/eng_busy/eng_done/wr_busy: status of the sub-kernels,
  // kept for observation in simulation; the run ends on wr_done
  logic [ADDR_W-1:0] rd_base, wr_base;
  logic [31:0]       rd_words, rd_iters, wr_words, job_param;
  logic              row_valid, row_ready;
  logic [DATA_W-1:0] row_data;
  logic              res_valid, res_ready;
  logic [RES_W-1:0]  res_data;

  kernel_ctrl #(.ADDR_W(ADDR_W)) u_ctrl (
    .clk, .rst_n, .reg_we, .reg_addr, .reg_wdata, .reg_rdata,
    .start, .rd_base, .rd_words, .rd_iters, .wr_base, .wr_words, .job_param,
    .wr_done, .irq, .running
  );

  mem_rd_kernel #(.ADDR_W(ADDR_W), .DATA_W(DATA_W), .FIFO_DEPTH(FIFO_DEPTH)) u_rd (
    .clk, .rst_n, .start, .base_addr(rd_base), .section_words(rd_words), .iterations(rd_iters),
    .rd_req_valid(dram_rd_req_valid), .rd_req_ready(dram_rd_req_ready), .rd_req_addr(dram_rd_req_addr),
    .rd_resp_valid(dram_rd_resp_valid), .rd_resp_data(dram_rd_resp_data),
    .out_valid(row_valid), .out_ready(row_ready), .out_data(row_data),
    .busy(rd_busy), .done(rd_done), .wrap_count
  );

  ed_engine #(.NUM_ARRAYS(NUM_ARRAYS), .STRLEN(STRLEN), .CHAR_W(8), .DW(16), .MODE(MODE)) u_eng (
    .clk, .rst_n, .start, .num_batches(job_param),
    .in_valid(row_valid), .in_ready(row_ready), .in_data(row_data),
    .out_valid(res_valid), .out_ready(res_ready), .out_data(res_data),
    .busy(eng_busy), .done(eng_done), .stall_cycles
  );

  mem_wr_kernel #(.ADDR_W(ADDR_W), .DATA_W(RES_W)) u_wr (
    .clk, .rst_n, .start, .base_addr(wr_base), .num_words(wr_words),
    .in_valid(res_valid), .in_ready(res_ready), .in_data(res_data),
    .wr_valid(dram_wr_valid), .wr_ready(dram_wr_ready), .wr_addr(dram_wr_addr), .wr_data(dram_wr_data),
    .busy(wr_busy), .done(wr_done)
  );

  dp_combiner #(.LANES(LANES), .KEYS(KEYS), .VW(VW)) u_cmb (
    .clk, .rst_n,
    .lane_valid(cmb_lane_valid), .lane_key(cmb_lane_key), .lane_val(cmb_lane_val),
    .clear(cmb_clear), .drain(cmb_drain),
    .out_valid(cmb_out_valid), .out_key(cmb_out_key), .out_val(cmb_out_val),
    .busy(cmb_busy), .bypass_count(cmb_bypass_count)
  );

  mem_wr_streams #(.STREAMS(WS_STREAMS), .ADDR_W(ADDR_W), .DATA_W(WS_W)) u_ws (
    .clk, .rst_n, .start(ws_start), .base_addr(ws_base), .num_words(ws_words),
    .in_valid(ws_valid), .in_ready(ws_ready), .in_data(ws_data),
    .wr_valid(dram2_wr_valid), .wr_ready(dram2_wr_ready), .wr_addr(dram2_wr_addr),
    .wr_data(dram2_wr_data), .busy(ws_busy), .done(ws_done)
  );

endmodule
