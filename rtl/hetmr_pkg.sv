// hetmr_pkg: types and constants shared by the FPGA kernels.
//
// dist_mode_e selects the recurrence of the string distance processors:
// Levenshtein edit distance (unit costs) or Smith-Waterman local alignment
// with a linear gap. The Smith-Waterman scores are this design's choice;
// the two variants themselves are the ones the design targets.
// The register map of kernel_ctrl is also defined here so that host-side
// testbenches and the RTL agree on it.
package hetmr_pkg;

  typedef enum logic [0:0] {
    DIST_LEV = 1'b0,  // Levenshtein edit distance
    DIST_SW  = 1'b1   // Smith-Waterman local alignment score
  } dist_mode_e;

  // Smith-Waterman scoring (linear gap penalty, score floor at zero)
  localparam int SW_MATCH    = 2;
  localparam int SW_MISMATCH = -1;
  localparam int SW_GAP      = 1;

  // kernel_ctrl register indices (32-bit registers)
  typedef enum logic [3:0] {
    REG_CTRL      = 4'd0,  // bit0: start (write 1), bit1: clear irq (write 1)
    REG_STATUS    = 4'd1,  // bit0: busy, bit1: done, bit2: timeout, bit3: irq
    REG_RD_BASE   = 4'd2,  // input memory kernel start address (words)
    REG_RD_WORDS  = 4'd3,  // words per iteration of the input section
    REG_RD_ITERS  = 4'd4,  // iterations over the input section
    REG_WR_BASE   = 4'd5,  // output memory kernel start address (words)
    REG_WR_WORDS  = 4'd6,  // words the output memory kernel will write
    REG_JOB_PARAM = 4'd7,  // static job parameter (batches, dimensions, ...)
    REG_CYCLES    = 4'd8,  // cycle budget of a run (0 = unlimited)
    REG_ELAPSED   = 4'd9   // cycles used by the last or current run
  } reg_idx_e;

endpackage
