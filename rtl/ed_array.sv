// ed_array: string distance calculator, a systolic array of 2*STRLEN+1
// ed_pe processors P_1..P_n for strings of up to STRLEN characters.
//
// How it works: the characters of S enter at the left end and those of T at
// the right end, in the same cycles (inject), with exactly one empty cycle
// between two injections. They cross inside the array; each processor owns
// one diagonal of the distance matrix and updates it when a character of S
// meets a character of T (see ed_pe). The array length 2*STRLEN+1 is the
// design's; reading the results out of the processors is this
// implementation's choice:
//   Levenshtein     result = cell of the processor on diagonal t_len-s_len,
//                   which holds D(s_len,t_len) once all pairs have met.
//   Smith-Waterman  result = maximum of the processors' best scores.
//
// Interface: pulse clear for one cycle before a new pair. Drive s_char and
// t_char (character k of each string, 0 past its end) with inject high in
// every other cycle in which en is high; with en low the array holds its
// state, so a missing input row stalls it without breaking the spacing.
// s_len/t_len give the string lengths (non-zero prefix).
// Timing: if the last characters are injected in cycle L, result is valid
// after STRLEN+2 further cycles with en high, until the next clear.
module ed_array
  import hetmr_pkg::*;
#(
  parameter int         STRLEN = 64,
  parameter int         CHAR_W = 8,
  parameter int         DW     = 16,
  parameter dist_mode_e MODE   = DIST_LEV,
  localparam int        LW     = $clog2(STRLEN + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 en,
  input  logic                 inject,
  input  logic [CHAR_W-1:0]    s_char,
  input  logic [CHAR_W-1:0]    t_char,
  input  logic [LW-1:0]        s_len,
  input  logic [LW-1:0]        t_len,
  output logic signed [DW-1:0] result
);

  localparam int N = 2 * STRLEN + 1;
  // value presented at the two open ends; never used by a real cell
  localparam int EDGE = (MODE == DIST_LEV) ? STRLEN + 1 : 0;

  logic [CHAR_W-1:0]    s_bus [N+1];  // s_bus[k] enters processor k
  logic [CHAR_W-1:0]    t_bus [N+1];  // t_bus[k+1] enters processor k
  logic signed [DW-1:0] d     [N];
  logic signed [DW-1:0] bst   [N];

  assign s_bus[0] = inject ? s_char : '0;
  assign t_bus[N] = inject ? t_char : '0;

  for (genvar k = 0; k < N; k++) begin : g_pe
    localparam int DIAG = (k >= STRLEN) ? k - STRLEN : STRLEN - k;
    logic signed [DW-1:0] dl, dr;
    assign dl = (k == 0)     ? DW'(EDGE) : d[k-1];
    assign dr = (k == N - 1) ? DW'(EDGE) : d[k+1];
    ed_pe #(
      .CHAR_W(CHAR_W), .DW(DW), .MODE(MODE),
      .INIT  ((MODE == DIST_LEV) ? DIAG : 0)
    ) u_pe (
      .clk, .rst_n, .clear, .en,
      .s_in (s_bus[k]),   .s_out(s_bus[k+1]),
      .t_in (t_bus[k+1]), .t_out(t_bus[k]),
      .d_left(dl), .d_right(dr), .d_out(d[k]), .best(bst[k])
    );
  end

  if (MODE == DIST_LEV) begin : g_lev
    logic [LW:0] sel;
    assign sel = (LW+1)'(STRLEN) + {1'b0, t_len} - {1'b0, s_len};
    assign result = d[sel];
  end else begin : g_sw
    always_comb begin
      result = '0;
      for (int k = 0; k < N; k++)
        if (bst[k] > result) result = bst[k];
    end
  end

endmodule
