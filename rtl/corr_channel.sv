// corr_channel: one lag of the correlator, an accumulator and its counter.
//
// Each integrate cycle the biased product of the channel's delayed sample and
// the undelayed sample is added to the 4-bit accumulator.  What overflows the
// accumulator (0, 1 or 2 with the default product range) is added to the
// 24-bit counter, so {count, acc} is the running sum of biased products and
// count alone is that sum divided by 16.  The counter wraps at 2^24.
//
// Instructions (synchronous, one per clock): clr clears acc and count (reset
// and dump); otherwise en integrates; otherwise both hold.  The count output
// is the registered counter, so a dump in cycle t sees the sum up to cycle t-1.
//
// The widths (4 and 24 bits) follow the specification.  That count collects
// the accumulator's carries is this design's reading: the specification lists
// both banks and says the dump moves the counters into the result registers.
module corr_channel
  import corr_pkg::*;
#(
  parameter int unsigned AW = ACC_W,
  parameter int unsigned CW = CNT_W
) (
  input  logic          clk,
  input  logic          clr,     // clear acc and count
  input  logic          en,      // integrate this cycle
  input  sample_t       a_dly,   // delayed sample
  input  sample_t       b_now,   // undelayed sample
  output logic [AW-1:0] acc,
  output logic [CW-1:0] count
);

  prod_t p;
  logic [AW+PROD_W-1:0] sum;

  bmult u_mult (.a(a_dly), .b(b_now), .p(p));

  assign sum = (AW+PROD_W)'(acc) + (AW+PROD_W)'(p);

  always_ff @(posedge clk) begin
    if (clr) begin
      acc   <= '0;
      count <= '0;
    end else if (en) begin
      acc   <= sum[AW-1:0];
      count <= count + CW'(sum[AW+PROD_W-1:AW]);
    end
  end

endmodule
