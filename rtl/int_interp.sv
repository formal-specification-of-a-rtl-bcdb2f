// int_interp: the INT interpreter, the producer side of the correlator.
//
// Every clock it executes one of three instructions, chosen in this order:
//   reset     (rn high)   clear every accumulator, counter and delay element;
//   dump      (intg high) end the integration period: offer the 32 counters
//                         to the result registers (dump pulse), clear the
//                         accumulators and counters;
//   integrate (otherwise) add the biased product of each delayed sample and
//                         the undelayed sample to that channel's accumulator.
// The delay line shifts on dump and integrate alike, so the stream history is
// kept across the end of a period and a new period starts at once.
//
// Stream a feeds the delay line and stream b is the undelayed one; channel n
// (0-based) therefore accumulates a(t-n-1) x b(t), lag n+1.  Which of the two
// streams is delayed, and that the delay line keeps shifting during a dump,
// are this design's choices; the instruction set, the priority of reset and
// the sizes follow the specification.
//
// Timing: dump is combinational from intg and rn; counts are registered, so
// the values offered with a dump in cycle t hold the products of cycles up to
// t-1.  The sample taken in the dump cycle is shifted into the delay line but
// its products are discarded.
module int_interp
  import corr_pkg::*;
#(
  parameter int unsigned N = NCH
) (
  input  logic    clk,
  input  logic    rn,            // reset
  input  logic    intg,          // end of integration period
  input  sample_t a,             // delayed stream
  input  sample_t b,             // undelayed stream
  output logic    dump,          // counts are to be latched this cycle
  output count_t  counts [N],    // counter of each channel
  output int_op_e op             // instruction executed this cycle
);

  sample_t taps [N];
  logic    ch_clr, ch_en;

  always_comb begin
    if (rn)        op = INT_RESET;
    else if (intg) op = INT_DUMP;
    else           op = INT_INTEGRATE;
  end

  assign dump   = (op == INT_DUMP);
  assign ch_clr = (op != INT_INTEGRATE);
  assign ch_en  = (op == INT_INTEGRATE);

  delay_line #(.N(N)) u_delay (
    .clk  (clk),
    .clr  (op == INT_RESET),
    .en   (1'b1),
    .din  (a),
    .taps (taps)
  );

  for (genvar n = 0; n < int'(N); n++) begin : g_ch
    logic [ACC_W-1:0] acc;
    corr_channel u_ch (
      .clk   (clk),
      .clr   (ch_clr),
      .en    (ch_en),
      .a_dly (taps[n]),
      .b_now (b),
      .acc   (acc),
      .count (counts[n])
    );
  end

endmodule
