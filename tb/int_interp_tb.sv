// int_interp_tb: the INT interpreter against a lag-by-lag reference model.
//
// Random 2-bit streams are fed in with integration periods of random length.
// The model keeps its own history of stream a and, per lag n, the integer sum
// of biased products a(t-n-1) x b(t) since the last dump.  Whenever intg is
// raised, the dump pulse and all 32 offered counters (sum / 16) are checked;
// every 37th clock the counters are checked too.  Reset is applied twice.
module int_interp_tb;
  import corr_pkg::*;

  localparam int N = 32;
  logic    clk = 0, rn, intg;
  sample_t a, b;
  logic    dump;
  count_t  counts [N];
  int_op_e op;
  sample_t hist [N];
  longint unsigned sum [N];
  int checks = 0, failures = 0, ndump = 0, nreset = 0;

  int_interp #(.N(N)) dut (.clk(clk), .rn(rn), .intg(intg), .a(a), .b(b),
                           .dump(dump), .counts(counts), .op(op));

  always #5 clk = ~clk;

  function automatic int level(sample_t s);
    int v;
    v = s[0] ? 3 : 1;
    return s[1] ? -v : v;
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_counts(string what);
    for (int n = 0; n < N; n++) begin
      checks++;
      if (counts[n] !== count_t'(sum[n] >> 4)) begin
        failures++;
        $display("%s: lag %0d count=%0d expected %0d", what, n + 1, counts[n], sum[n] >> 4);
      end
    end
  endtask

  initial begin
    int period;
    rn = 1; intg = 0; a = '0; b = '0;
    @(posedge clk); #1;
    for (int n = 0; n < N; n++) begin hist[n] = '0; sum[n] = 0; end
    rn = 0;
    period = 0;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      a  = sample_t'($urandom);
      b  = sample_t'($urandom);
      rn = (cyc == 9000);
      period++;
      intg = !rn && (period > 40) && (($urandom % 300) == 0 || period > 600);
      #1;
      // Instruction decode.
      checks++;
      if (dump !== intg) begin
        failures++;
        $display("dump=%0b with intg=%0b rn=%0b", dump, intg, rn);
      end
      if (intg) begin
        check_counts("dump");
        ndump++;
      end else if (cyc % 37 == 0) begin
        check_counts("integrate");
      end
      @(posedge clk); #1;
      // Model update for this clock.
      if (rn) begin
        nreset++;
        for (int n = 0; n < N; n++) begin hist[n] = '0; sum[n] = 0; end
      end else begin
        for (int n = 0; n < N; n++) begin
          if (intg) sum[n] = 0;
          else      sum[n] += longint'(level(hist[n]) * level(b) + 9);
        end
        for (int n = N - 1; n > 0; n--) hist[n] = hist[n-1];
        hist[0] = a;
      end
      if (intg) period = 0;
    end
    checks++;
    if (ndump < 20 || nreset < 1) begin
      failures++;
      $display("too few dumps (%0d) or resets (%0d)", ndump, nreset);
    end
    $display("dumps=%0d resets=%0d", ndump, nreset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
