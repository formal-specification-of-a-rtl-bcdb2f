// correlator: 32-lag, 2-bit cross-correlator with a word or byte serial
// read-out port.
//
// Two interpreters run side by side on one clock.  The INT interpreter
// multiplies delayed copies of stream a with the undelayed stream b, sums the
// biased products of each lag for the length of an integration period and, on
// intg, dumps the 32 sums into the shared result registers and raises
// datardy.  The IO interpreter then reads the results out on out[15:0], one
// transfer per clock with outck high, words or bytes as byte_mode selects at
// the start of the read, and drops datardy when it is done.  Integration
// continues during the read.
//
// Interface: rn is a synchronous reset of both interpreters.  intg high for
// one clock ends the period; datardy rises on the next clock.  The read
// starts the clock after that, after which each clock with outck high puts
// the next value on out (registered), channel 32 first.  One clock after the
// last transfer datardy falls.
//
// The structure (two interpreters sharing sr and datardy) follows the
// specification; the details recorded in the sub-blocks are this design's.
module correlator
  import corr_pkg::*;
(
  input  logic    clk,
  input  logic    rn,         // reset
  input  logic    intg,       // end of integration period
  input  sample_t a,          // stream feeding the delay line
  input  sample_t b,          // undelayed stream
  input  logic    byte_mode,  // 1: byte serial read, 0: word serial read
  input  logic    outck,      // output transfer strobe
  output word_t   out,        // output register
  output logic    datardy     // results are ready to be read
);

  logic    dump, start_read, end_read, begin_rd, borw;
  count_t  counts [NCH];
  count_t  sr [NCH];
  ctr_t    counter;
  int_op_e int_op;
  io_op_e  io_op;

  int_interp #(.N(NCH)) u_int (
    .clk    (clk),
    .rn     (rn),
    .intg   (intg),
    .a      (a),
    .b      (b),
    .dump   (dump),
    .counts (counts),
    .op     (int_op)
  );

  sr_link #(.N(NCH)) u_link (
    .clk        (clk),
    .rn         (rn),
    .dump       (dump),
    .counts     (counts),
    .start_read (start_read),
    .end_read   (end_read),
    .sr         (sr),
    .datardy    (datardy),
    .begin_rd   (begin_rd)
  );

  io_interp #(.N(NCH)) u_io (
    .clk        (clk),
    .rn         (rn),
    .byte_mode  (byte_mode),
    .outck      (outck),
    .datardy    (datardy),
    .begin_rd   (begin_rd),
    .sr         (sr),
    .start_read (start_read),
    .end_read   (end_read),
    .out        (out),
    .counter    (counter),
    .borw       (borw),
    .op         (io_op)
  );

endmodule
