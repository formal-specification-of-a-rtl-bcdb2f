// sr_link_tb: the shared result registers and ready flags.
//
// Random dump, start_read and end_read requests (start only while begin_rd is
// set, end only while datardy is set, as the interpreters issue them) and an
// occasional reset are applied; a model of the registers and flags with the
// stated priorities (reset, dump, then start / end) is compared after every
// clock.
module sr_link_tb;
  import corr_pkg::*;

  localparam int N = 32;
  logic   clk = 0, rn, dump, start_read, end_read;
  count_t counts [N];
  count_t sr [N];
  logic   datardy, begin_rd;
  count_t m_sr [N];
  logic   m_rdy, m_beg;
  int checks = 0, failures = 0, n_dump_during_read = 0;

  sr_link #(.N(N)) dut (.clk(clk), .rn(rn), .dump(dump), .counts(counts),
                        .start_read(start_read), .end_read(end_read),
                        .sr(sr), .datardy(datardy), .begin_rd(begin_rd));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rn = 1; dump = 0; start_read = 0; end_read = 0;
    for (int n = 0; n < N; n++) counts[n] = '0;
    @(posedge clk); #1;
    for (int n = 0; n < N; n++) m_sr[n] = '0;
    m_rdy = 0; m_beg = 0;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      rn         = ($urandom % 700) == 0;
      dump       = ($urandom % 10) == 0;
      start_read = m_beg && ($urandom % 2);
      end_read   = m_rdy && !m_beg && ($urandom % 8) == 0;
      for (int n = 0; n < N; n++) counts[n] = count_t'($urandom);
      @(posedge clk); #1;
      if (rn) begin
        for (int n = 0; n < N; n++) m_sr[n] = '0;
        m_rdy = 0; m_beg = 0;
      end else if (dump) begin
        if (m_rdy) n_dump_during_read++;
        m_sr  = counts;
        m_rdy = 1; m_beg = 1;
      end else begin
        if (start_read) m_beg = 0;
        if (end_read)   m_rdy = 0;
      end
      checks++;
      if (datardy !== m_rdy || begin_rd !== m_beg) begin
        failures++;
        $display("flags datardy=%0b begin_rd=%0b expected %0b %0b", datardy, begin_rd, m_rdy, m_beg);
      end
      for (int n = 0; n < N; n++) begin
        checks++;
        if (sr[n] !== m_sr[n]) begin
          failures++;
          $display("sr[%0d]=%h expected %h", n, sr[n], m_sr[n]);
        end
      end
    end
    $display("dumps while data was waiting: %0d", n_dump_during_read);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
