// corr_pkg: sizes, the sample format and the instruction encodings shared by
// the correlator's blocks.
//
// The correlator cross-correlates two 2-bit sample streams over 32 lags.
// Sizes follow the specification: 32 channels, 2-bit samples, 4-bit
// accumulators feeding 24-bit counters, 24-bit result registers, a 16-bit
// output register and a 7-bit output counter.
//
// A sample is {sign, magnitude}: sign 1 means negative, magnitude 1 means the
// outer level.  The level values (1 and 3) and the bias of the product are this
// design's choice; the specification only says that the multiplication is
// biased.
package corr_pkg;

  localparam int unsigned NCH    = 32;  // channels (lags)
  localparam int unsigned SAMP_W = 2;   // sample width
  localparam int unsigned ACC_W  = 4;   // accumulator width
  localparam int unsigned CNT_W  = 24;  // counter / result register width
  localparam int unsigned OUT_W  = 16;  // output register width
  localparam int unsigned CTR_W  = 7;   // output counter width

  // Quantiser levels: magnitude bit 0 -> 1, 1 -> HI_LEVEL.
  localparam int unsigned HI_LEVEL = 3;
  // Bias added to the signed product: the largest product magnitude.
  localparam int unsigned BIAS     = HI_LEVEL * HI_LEVEL;
  // Width of a biased product (0 .. 2*BIAS).
  localparam int unsigned PROD_W   = $clog2(2 * BIAS + 1);

  typedef logic [SAMP_W-1:0] sample_t;
  typedef logic [PROD_W-1:0] prod_t;
  typedef logic [CNT_W-1:0]  count_t;
  typedef logic [OUT_W-1:0]  word_t;
  typedef logic [CTR_W-1:0]  ctr_t;

  // INT interpreter instructions, in priority order.
  typedef enum logic [1:0] {
    INT_RESET     = 2'd0,
    INT_DUMP      = 2'd1,
    INT_INTEGRATE = 2'd2
  } int_op_e;

  // IO interpreter instructions, in priority order.
  typedef enum logic [2:0] {
    IO_RESET      = 3'd0,
    IO_START_READ = 3'd1,
    IO_END_READ   = 3'd2,
    IO_DUMP_BYTE  = 3'd3,
    IO_DUMP_WORD  = 3'd4,
    IO_NOOP       = 3'd5
  } io_op_e;

endpackage
