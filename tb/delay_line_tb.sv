// delay_line_tb: random samples through the 32-element delay line.
//
// A history array of the inputs is kept; each tap n must equal the input from
// n+1 enabled clocks earlier.  Shift enable is dropped at random, and the
// clear is exercised at the start and once in the middle.
module delay_line_tb;
  import corr_pkg::*;

  localparam int N = 32;
  logic    clk = 0, clr, en;
  sample_t din;
  sample_t taps [N];
  sample_t hist [N];   // hist[k]: input from k+1 shifts ago
  int checks = 0, failures = 0;

  delay_line #(.N(N)) dut (.clk(clk), .clr(clr), .en(en), .din(din), .taps(taps));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_taps();
    for (int n = 0; n < N; n++) begin
      checks++;
      if (taps[n] !== hist[n]) begin
        failures++;
        $display("tap %0d = %0d expected %0d", n, taps[n], hist[n]);
      end
    end
  endtask

  initial begin
    clr = 1; en = 0; din = '0;
    @(posedge clk); #1;
    clr = 0;
    for (int n = 0; n < N; n++) hist[n] = '0;
    for (int cyc = 0; cyc < 400; cyc++) begin
      din = sample_t'($urandom);
      en  = ($urandom % 4) != 0;
      clr = (cyc == 200);
      @(posedge clk); #1;
      if (clr) begin
        for (int n = 0; n < N; n++) hist[n] = '0;
      end else if (en) begin
        for (int n = N - 1; n > 0; n--) hist[n] = hist[n-1];
        hist[0] = din;
      end
      check_taps();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
