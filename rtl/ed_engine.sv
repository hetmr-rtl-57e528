// ed_engine: NUM_ARRAYS string distance calculators fed in parallel from the
// character-interleaved memory layout.
//
// Layout: strings are not stored one after the other. Row k of a batch (one
// NUM_ARRAYS*2-byte word, 192 bytes for 96 arrays) holds character k of all
// NUM_ARRAYS string pairs: byte 2p is the character of string S of pair p,
// byte 2p+1 that of string T. A batch is STRLEN rows; strings shorter than
// STRLEN are padded with zero bytes. Each row thus feeds every array with its
// two bytes at once, avoiding the one-character-at-a-time read that the
// systolic dependency would otherwise impose on a sequential layout. The
// 96-way replication and the row layout follow the design; the byte order
// inside a pair, the zero padding and the 16-bit result width are this
// implementation's choices.
//
// Operation: start loads num_batches. For each batch the arrays are cleared,
// STRLEN rows are injected (one row every two cycles: the arrays need an
// empty slot between characters), the arrays drain for STRLEN+2 cycles, and
// one result row (NUM_ARRAYS x DW bits, result of pair p in bits p*DW +: DW)
// is offered on out_*. A row missing at its injection slot stalls all arrays
// (stall_cycles counts such cycles); a result row not taken holds the engine.
// Throughput: 2*STRLEN + STRLEN + 4 cycles per batch when rows arrive on time.
// in_* and out_* are valid/ready streams; done pulses after the last result.
module ed_engine
  import hetmr_pkg::*;
#(
  parameter int         NUM_ARRAYS = 96,
  parameter int         STRLEN     = 64,
  parameter int         CHAR_W     = 8,
  parameter int         DW         = 16,
  parameter dist_mode_e MODE       = DIST_LEV,
  localparam int        IN_W       = NUM_ARRAYS * 2 * CHAR_W,
  localparam int        OUT_W      = NUM_ARRAYS * DW
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [31:0]      num_batches,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [IN_W-1:0]  in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [OUT_W-1:0] out_data,
  output logic             busy,
  output logic             done,
  output logic [31:0]      stall_cycles
);

  localparam int LW = $clog2(STRLEN + 1);
  localparam int CW = $clog2(STRLEN + 3);

  typedef enum logic [2:0] {S_IDLE, S_CLEAR, S_FEED, S_DRAIN, S_OUT} state_e;
  state_e state_q;

  logic          phase_q;       // 0: injection slot, 1: empty slot
  logic [LW-1:0] row_q;         // rows injected in this batch
  logic [CW-1:0] drain_q;
  logic [31:0]   batches_q, batch_q;
  logic          clear, en, inject;

  logic [LW-1:0] s_len_q [NUM_ARRAYS];
  logic [LW-1:0] t_len_q [NUM_ARRAYS];

  assign clear    = (state_q == S_CLEAR);
  assign inject   = (state_q == S_FEED) && !phase_q && in_valid;
  assign in_ready = inject;
  assign en       = ((state_q == S_FEED) && (phase_q || in_valid)) || (state_q == S_DRAIN);
  assign busy     = (state_q != S_IDLE);
  assign out_valid = (state_q == S_OUT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= S_IDLE;
      phase_q      <= 1'b0;
      row_q        <= '0;
      drain_q      <= '0;
      batches_q    <= '0;
      batch_q      <= '0;
      done         <= 1'b0;
      stall_cycles <= '0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          batches_q    <= num_batches;
          batch_q      <= '0;
          stall_cycles <= '0;
          state_q      <= (num_batches == 0) ? S_IDLE : S_CLEAR;
          done         <= (num_batches == 0);
        end
        S_CLEAR: begin
          phase_q <= 1'b0;
          row_q   <= '0;
          drain_q <= '0;
          state_q <= S_FEED;
        end
        S_FEED: begin
          if (phase_q) begin
            phase_q <= 1'b0;
            if (row_q == LW'(STRLEN)) state_q <= S_DRAIN;
          end else if (in_valid) begin
            phase_q <= 1'b1;
            row_q   <= row_q + 1'b1;
          end else begin
            stall_cycles <= stall_cycles + 1;
          end
        end
        S_DRAIN: begin
          drain_q <= drain_q + 1'b1;
          if (drain_q == CW'(STRLEN + 1)) state_q <= S_OUT;
        end
        S_OUT: if (out_ready) begin
          batch_q <= batch_q + 1;
          if (batch_q + 1 == batches_q) begin
            state_q <= S_IDLE;
            done    <= 1'b1;
          end else begin
            state_q <= S_CLEAR;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  for (genvar a = 0; a < NUM_ARRAYS; a++) begin : g_arr
    logic [CHAR_W-1:0]    s_ch, t_ch;
    logic signed [DW-1:0] res;
    assign s_ch = in_data[(2*a)*CHAR_W +: CHAR_W];
    assign t_ch = in_data[(2*a+1)*CHAR_W +: CHAR_W];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        s_len_q[a] <= '0;
        t_len_q[a] <= '0;
      end else if (clear) begin
        s_len_q[a] <= '0;
        t_len_q[a] <= '0;
      end else if (inject) begin
        if (s_ch != '0) s_len_q[a] <= s_len_q[a] + 1'b1;
        if (t_ch != '0) t_len_q[a] <= t_len_q[a] + 1'b1;
      end
    end

    ed_array #(.STRLEN(STRLEN), .CHAR_W(CHAR_W), .DW(DW), .MODE(MODE)) u_arr (
      .clk, .rst_n, .clear, .en, .inject,
      .s_char(s_ch), .t_char(t_ch),
      .s_len(s_len_q[a]), .t_len(t_len_q[a]),
      .result(res)
    );
    assign out_data[a*DW +: DW] = res;
  end

  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule
