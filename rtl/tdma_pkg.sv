// Shared constants of the tri-diagonal (Thomas algorithm) co-processor.
//
// The floating-point format is a generic sign / biased exponent / hidden-one
// mantissa format.  Its widths are parameters of every arithmetic module; the
// defaults below give the IEEE-754 single-precision layout (8-bit exponent,
// 23-bit mantissa), the configuration the design is characterised in.  The
// format has no NaN, infinity or subnormal: an exponent field of zero means the
// value zero, and results are truncated, never rounded.
//
// One matrix row travels as four such words (L, D, U, x) in one 128-bit input
// memory word; the memory geometry constants describe the 8 MB QDR SRAM
// pair each side of the co-processor uses.
package tdma_pkg;

  // Default floating-point widths (single precision layout).
  localparam int unsigned FP_EXP_W = 8;
  localparam int unsigned FP_MAN_W = 23;
  localparam int unsigned FP_W     = 1 + FP_EXP_W + FP_MAN_W;

  // Default number of Goldschmidt iterations in the divider.
  localparam int unsigned FP_GS_ITER = 5;

  // Depth of each of the two system register banks (rows per system).
  localparam int unsigned BANK_MAX_N = 32;

  // External memory: two 64-bit 8 MB SRAMs side by side give one 128-bit word
  // per address, 2**20 addresses.
  localparam int unsigned SRAM_ADDR_W = 20;
  localparam int unsigned SRAM_DATA_W = 128;
  // Read latency of the input SRAM port, in clock cycles.
  localparam int unsigned SRAM_RD_LAT = 2;
  // Solution words packed into one output SRAM word.
  localparam int unsigned OUT_LANES = 4;

  // Run controller states of the top level.
  typedef enum logic [1:0] {
    CTL_IDLE = 2'd0,
    CTL_RUN  = 2'd1,
    CTL_DONE = 2'd2
  } ctl_state_e;

endpackage
