// corr_channel_tb: one correlator lag against a running sum.
//
// Random sample pairs are integrated; the model keeps the plain integer sum
// of biased products (signed product of the levels +/-1, +/-3, plus 9), and
// after every clock {count, acc} must equal that sum modulo 2^28.  Clears and
// idle cycles are mixed in.  A second phase presets a large sum by running
// many all-outer-level products and checks the counter's high bits.
module corr_channel_tb;
  import corr_pkg::*;

  logic             clk = 0, clr, en;
  sample_t          a, b;
  logic [ACC_W-1:0] acc;
  count_t           count;
  longint unsigned  sum;
  int checks = 0, failures = 0;

  corr_channel dut (.clk(clk), .clr(clr), .en(en), .a_dly(a), .b_now(b),
                    .acc(acc), .count(count));

  always #5 clk = ~clk;

  function automatic int level(sample_t s);
    int v;
    v = s[0] ? 3 : 1;
    return s[1] ? -v : v;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step();
    @(posedge clk); #1;
    if (clr)     sum = 0;
    else if (en) sum += longint'(level(a) * level(b) + 9);
    checks++;
    if ({count, acc} !== 28'(sum)) begin
      failures++;
      $display("count=%0d acc=%0d expected sum %0d", count, acc, sum);
    end
  endtask

  initial begin
    clr = 1; en = 0; a = '0; b = '0; sum = 0;
    step();
    for (int cyc = 0; cyc < 3000; cyc++) begin
      a   = sample_t'($urandom);
      b   = sample_t'($urandom);
      clr = ($urandom % 500) == 0;
      en  = ($urandom % 8) != 0;
      step();
    end
    // Long run of maximal products (+3 x +3 -> 18) to reach the high bits.
    clr = 0; en = 1; a = 2'b01; b = 2'b01;
    for (int cyc = 0; cyc < 100000; cyc++) begin
      @(posedge clk); #1;
      sum += 18;
    end
    checks++;
    if ({count, acc} !== 28'(sum)) begin
      failures++;
      $display("long run: count=%0d acc=%0d expected sum %0d", count, acc, sum);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
