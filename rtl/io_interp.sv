// io_interp: the IO interpreter, the consumer side of the correlator.
//
// Every clock it executes one of six instructions, chosen in this order:
//   reset      (rn)                          counter, out and borw to 0;
//   start_read (datardy & begin_rd)          latch byte_mode into borw and
//                                            load counter with the number of
//                                            transfers: N words or 2N bytes;
//   end_read   (datardy & counter == 0)      pulse end_read (datardy falls);
//   dump_byte  (datardy & borw & outck)      put one byte on out, decrement;
//   dump_word  (datardy & ~borw & outck)     put one word on out, decrement;
//   noop       (otherwise).
// A word is the 16 most significant bits of result register i, where i is the
// counter value before the decrement and registers are numbered 1 .. N, so
// the channels come out from N down to 1.  In byte mode counter value c reads
// register (c+1)/2: even c gives bits 23:16, odd c bits 15:8, both on
// out[7:0] with out[15:8] at zero.
//
// Timing: out, counter and borw are registers; start_read and end_read are
// combinational pulses to the shared flags.  outck is sampled on the clock,
// one transfer per clock in which it is high.  An N-channel read in word mode
// takes one start cycle, N outck cycles and one end cycle.
//
// The instruction set, its priorities, the 7-bit counter, the 16-bit output
// and the word transfer follow the specification.  The transfer counts, the
// byte order and lane, the reset values and the single clock shared with the
// INT interpreter are this design's choices.
module io_interp
  import corr_pkg::*;
#(
  parameter int unsigned N = NCH
) (
  input  logic    clk,
  input  logic    rn,            // reset
  input  logic    byte_mode,     // 1: byte serial, 0: word serial
  input  logic    outck,         // transfer strobe
  input  logic    datardy,
  input  logic    begin_rd,
  input  count_t  sr [N],
  output logic    start_read,
  output logic    end_read,
  output word_t   out,
  output ctr_t    counter,
  output logic    borw,          // byte (1) or word (0) read in progress
  output io_op_e  op
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] widx, bidx;     // 0-based register index for word / byte
  count_t        wreg, breg;
  logic [7:0]    bsel;

  always_comb begin
    if (rn)                                   op = IO_RESET;
    else if (datardy && begin_rd)             op = IO_START_READ;
    else if (datardy && counter == '0)        op = IO_END_READ;
    else if (datardy && borw && outck)        op = IO_DUMP_BYTE;
    else if (datardy && !borw && outck)       op = IO_DUMP_WORD;
    else                                      op = IO_NOOP;
  end

  assign start_read = (op == IO_START_READ);
  assign end_read   = (op == IO_END_READ);

  // Word: register counter (1-based) -> index counter-1.
  assign widx = IW'(counter - ctr_t'(1));
  // Byte: register (counter+1)/2 (1-based) -> index (counter-1)/2.
  assign bidx = IW'((counter - ctr_t'(1)) >> 1);
  assign wreg = sr[widx];
  assign breg = sr[bidx];
  assign bsel = counter[0] ? breg[CNT_W-9 -: 8] : breg[CNT_W-1 -: 8];

  always_ff @(posedge clk) begin
    unique case (op)
      IO_RESET: begin
        counter <= '0;
        out     <= '0;
        borw    <= 1'b0;
      end
      IO_START_READ: begin
        borw    <= byte_mode;
        counter <= byte_mode ? ctr_t'(2 * N) : ctr_t'(N);
      end
      IO_DUMP_BYTE: begin
        counter <= counter - ctr_t'(1);
        out     <= word_t'(bsel);
      end
      IO_DUMP_WORD: begin
        counter <= counter - ctr_t'(1);
        out     <= wreg[CNT_W-1 -: OUT_W];
      end
      default: ;
    endcase
  end

  // The counter never exceeds the number of transfers of a byte read.
  a_counter_range: assert property (@(posedge clk) disable iff (rn) counter <= ctr_t'(2 * N));

endmodule
