// delay_line: the bank of 2-bit delay elements of the INT interpreter.
//
// Element 0 takes the input sample each enabled cycle and every element n
// takes element n-1, so element n holds the sample from n+1 enabled cycles
// earlier.  Channel n of the correlator multiplies element n with the
// undelayed stream, giving lags 1 .. NCH.
//
// Timing: one register stage per element, shifting on every rising clock edge
// with en high.  clr (synchronous) loads the zero sample (+1) into every element.
// The number of elements (32) and their width follow the specification; the
// reset value is this design's choice.
module delay_line
  import corr_pkg::*;
#(
  parameter int unsigned N = NCH
) (
  input  logic    clk,
  input  logic    clr,        // synchronous clear
  input  logic    en,         // shift enable
  input  sample_t din,        // delayed stream in
  output sample_t taps [N]    // taps[n]: din from n+1 shifts ago
);

  sample_t d [N];

  always_ff @(posedge clk) begin
    if (clr) begin
      for (int n = 0; n < int'(N); n++) d[n] <= '0;
    end else if (en) begin
      d[0] <= din;
      for (int n = 1; n < int'(N); n++) d[n] <= d[n-1];
    end
  end

  assign taps = d;

endmodule
