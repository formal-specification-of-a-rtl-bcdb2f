// sr_link: the state shared by the two interpreters.
//
// It holds the 32 result registers (sr) that the INT interpreter fills at the
// end of an integration period and the IO interpreter reads out, plus two
// flags: datardy (results are waiting to be read) and begin_rd (a new set of
// results has arrived and its read cycle has not yet started).
//
// Per clock, in this order of priority:
//   rn          clears sr, datardy and begin_rd;
//   dump        loads sr from the counters and sets datardy and begin_rd;
//   start_read  clears begin_rd;
//   end_read    clears datardy.
// A dump that arrives while a read is in progress overwrites sr and sets
// begin_rd again, so the IO interpreter restarts its read on the new data.
//
// That INT sets datardy on its dump and IO clears it at the end of a read
// follows the specification, as does datardy rising one cycle after the end
// of an integration period.  The begin_rd flag, the clear of sr on reset and
// the priority of a dump over a concurrent end of read are this design's
// reading.
module sr_link
  import corr_pkg::*;
#(
  parameter int unsigned N = NCH
) (
  input  logic   clk,
  input  logic   rn,
  input  logic   dump,          // from INT
  input  count_t counts [N],    // from INT
  input  logic   start_read,    // from IO
  input  logic   end_read,      // from IO
  output count_t sr [N],
  output logic   datardy,
  output logic   begin_rd
);

  always_ff @(posedge clk) begin
    if (rn) begin
      for (int n = 0; n < int'(N); n++) sr[n] <= '0;
      datardy  <= 1'b0;
      begin_rd <= 1'b0;
    end else if (dump) begin
      sr       <= counts;
      datardy  <= 1'b1;
      begin_rd <= 1'b1;
    end else begin
      if (start_read) begin_rd <= 1'b0;
      if (end_read)   datardy  <= 1'b0;
    end
  end

  // The IO interpreter only starts a read on fresh data and only ends one
  // while data is marked ready.
  a_start_fresh: assert property (@(posedge clk) disable iff (rn) start_read |-> begin_rd);
  a_end_ready:   assert property (@(posedge clk) disable iff (rn) end_read |-> datardy);

endmodule
