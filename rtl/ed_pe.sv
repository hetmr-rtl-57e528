// ed_pe: one processor of the bidirectional string-distance systolic array.
//
// Function: string S travels left to right and string T right to left
// through a chain of these processors, one position per cycle, with an
// empty slot (character 0) between consecutive characters. Processor k of a
// chain of 2*STRLEN+1 owns diagonal j-i = k-STRLEN of the dynamic-programming
// matrix D(i,j); characters s_i and t_j meet in it exactly once, and in that
// cycle it computes D(i,j) from
//   its own register    D(i-1,j-1)  (same diagonal, computed two cycles ago)
//   d_left              D(i,j-1)    (left neighbour, computed one cycle ago)
//   d_right             D(i-1,j)    (right neighbour, computed one cycle ago)
// MODE selects the recurrence:
//   DIST_LEV : D = min(D(i-1,j-1)+[s!=t], D(i,j-1)+1, D(i-1,j)+1)
//   DIST_SW  : H = max(0, H(i-1,j-1)+match/mismatch, H(i,j-1)-gap, H(i-1,j)-gap)
//              and best keeps the largest H seen (the local-alignment score).
// The chain of processors and the two opposite one-byte streams follow the
// design; the per-cell arithmetic, the empty-slot spacing and the scores in
// hetmr_pkg are this implementation's choices.
//
// Interface: s_in/t_in are the characters entering this cycle (registered
// here and passed on through s_out/t_out one cycle later). clear reloads the
// cell with INIT, the matrix border value of this diagonal (|k-STRLEN| for
// Levenshtein, 0 for Smith-Waterman), and empties the character slots.
// en low freezes the processor (the whole array stalls together).
// Timing: one cell per meeting, result in d_out the cycle after the meeting.
module ed_pe
  import hetmr_pkg::*;
#(
  parameter int         CHAR_W = 8,
  parameter int         DW     = 16,
  parameter dist_mode_e MODE   = DIST_LEV,
  parameter int         INIT   = 0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 en,
  input  logic [CHAR_W-1:0]    s_in,
  input  logic [CHAR_W-1:0]    t_in,
  output logic [CHAR_W-1:0]    s_out,
  output logic [CHAR_W-1:0]    t_out,
  input  logic signed [DW-1:0] d_left,
  input  logic signed [DW-1:0] d_right,
  output logic signed [DW-1:0] d_out,
  output logic signed [DW-1:0] best
);

  logic [CHAR_W-1:0]    s_q, t_q;
  logic signed [DW-1:0] d_q, best_q, d_new;
  logic                 meet;

  assign meet = (s_q != '0) && (t_q != '0);

  always_comb begin
    logic signed [DW-1:0] diag, from_l, from_r, m;
    if (MODE == DIST_LEV) begin
      diag   = d_q + ((s_q == t_q) ? DW'(0) : DW'(1));
      from_l = d_left + DW'(1);
      from_r = d_right + DW'(1);
      m = (diag < from_l) ? diag : from_l;
      d_new = (m < from_r) ? m : from_r;
    end else begin
      diag   = d_q + ((s_q == t_q) ? DW'(SW_MATCH) : DW'(SW_MISMATCH));
      from_l = d_left - DW'(SW_GAP);
      from_r = d_right - DW'(SW_GAP);
      m = (diag > from_l) ? diag : from_l;
      m = (m > from_r) ? m : from_r;
      d_new = (m > 0) ? m : '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_q    <= '0;
      t_q    <= '0;
      d_q    <= DW'(INIT);
      best_q <= '0;
    end else if (clear) begin
      s_q    <= '0;
      t_q    <= '0;
      d_q    <= DW'(INIT);
      best_q <= '0;
    end else if (en) begin
      s_q <= s_in;
      t_q <= t_in;
      if (meet) begin
        d_q <= d_new;
        if (d_new > best_q) best_q <= d_new;
      end
    end
  end

  assign s_out = s_q;
  assign t_out = t_q;
  assign d_out = d_q;
  assign best  = best_q;

endmodule
