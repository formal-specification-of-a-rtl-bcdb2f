// bmult_tb: exhaustive check of the biased multiplier.
//
// All 16 sample pairs are applied; the expected value is worked out from the
// sample levels (+/-1, +/-3) as a signed product plus 9.
module bmult_tb;
  import corr_pkg::*;

  sample_t a, b;
  prod_t   p;
  int checks = 0, failures = 0;

  bmult dut (.a(a), .b(b), .p(p));

  function automatic int level(sample_t s);
    int v;
    v = s[0] ? 3 : 1;
    return s[1] ? -v : v;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        int exp_p;
        a = sample_t'(i);
        b = sample_t'(j);
        #1;
        exp_p = level(a) * level(b) + 9;
        checks++;
        if (int'(p) != exp_p) begin
          failures++;
          $display("bmult a=%0d b=%0d p=%0d expected %0d", a, b, p, exp_p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
