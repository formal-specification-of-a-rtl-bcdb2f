// correlator_tb: end-to-end test of the correlator at its default size.
//
// Random 2-bit streams are correlated over integration periods of random
// length; after each period the results are read out, word or byte serial in
// turn, while the next period integrates.  A reference model keeps its own
// history of stream a and the integer sum of biased products per lag (levels
// +/-1 and +/-3, bias 9); at each end of period it takes sum / 16 (mod 2^24)
// as the expected result of each lag and, from the start of each read, lists
// the transfers expected on out (channel 32 first; word = bits 23:8, bytes =
// bits 23:16 then 15:8).
//
// Also checked: datardy rises one clock after intg, falls only when all
// transfers are done, and a reset in mid-read clears it.  Each mechanism of
// the two interpreters is counted (integrate, dump, reset, start/end of read,
// byte and word transfers, idle clocks, and a dump that arrives while a read
// is still in progress) and a mechanism that never happened is a failure.
module correlator_tb;
  import corr_pkg::*;

  localparam int N = NCH;
  logic    clk = 0, rn, intg, byte_mode, outck;
  sample_t a, b;
  word_t   out;
  logic    datardy;

  sample_t         hist [N];
  longint unsigned sum [N];
  count_t          snap [N];
  word_t           exp_q [$];
  bit              m_rdy;
  int checks = 0, failures = 0;
  int n_integrate = 0, n_dump = 0, n_reset = 0, n_start = 0, n_end = 0;
  int n_byte = 0, n_word = 0, n_noop = 0, n_overrun = 0;

  correlator dut (.clk(clk), .rn(rn), .intg(intg), .a(a), .b(b),
                  .byte_mode(byte_mode), .outck(outck), .out(out), .datardy(datardy));

  always #20 clk = ~clk;   // 25 MHz

  function automatic int level(sample_t s);
    int v;
    v = s[0] ? 3 : 1;
    return s[1] ? -v : v;
  endfunction

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  // One clock with the given controls; the model follows the documented
  // behaviour of the whole design.
  task automatic cycle(bit r, bit i, bit bm, bit ock);
    io_op_e  io_op;
    rn = r; intg = i; byte_mode = bm; outck = ock;
    a = sample_t'($urandom);
    b = sample_t'($urandom);
    #1;
    io_op = dut.u_io.op;
    // Mechanism counts.
    if (r) n_reset++;
    else if (i) n_dump++;
    else n_integrate++;
    case (io_op)
      IO_START_READ: n_start++;
      IO_END_READ:   n_end++;
      IO_DUMP_BYTE:  n_byte++;
      IO_DUMP_WORD:  n_word++;
      IO_NOOP:       n_noop++;
      default: ;
    endcase
    if (!r && i && m_rdy) n_overrun++;
    // Reads: the read starts on fresh data and ends when all is out.
    if (!r && io_op == IO_START_READ) begin
      exp_q.delete();
      for (int ch = N; ch >= 1; ch--) begin
        if (bm) begin
          exp_q.push_back(word_t'(snap[ch-1][CNT_W-1 -: 8]));
          exp_q.push_back(word_t'(snap[ch-1][CNT_W-9 -: 8]));
        end else begin
          exp_q.push_back(snap[ch-1][CNT_W-1 -: OUT_W]);
        end
      end
    end
    if (!r && io_op == IO_END_READ)
      check(exp_q.size() == 0, $sformatf("read ended with %0d transfers missing", exp_q.size()));
    @(posedge clk); #1;
    if (r) begin
      for (int n = 0; n < N; n++) begin hist[n] = '0; sum[n] = 0; end
      exp_q.delete();
      m_rdy = 0;
    end else begin
      if (i) begin
        for (int n = 0; n < N; n++) snap[n] = count_t'(sum[n] >> 4);
        m_rdy = 1;
      end else if (io_op == IO_END_READ) begin
        m_rdy = 0;
      end
      if (io_op == IO_DUMP_BYTE || io_op == IO_DUMP_WORD) begin
        word_t e;
        check(exp_q.size() > 0, "transfer beyond the end of the read");
        e = (exp_q.size() > 0) ? exp_q.pop_front() : '0;
        check(out == e, $sformatf("out=%h expected %h", out, e));
      end
      for (int n = 0; n < N; n++) begin
        if (i) sum[n] = 0;
        else   sum[n] += longint'(level(hist[n]) * level(b) + 9);
      end
      for (int n = N - 1; n > 0; n--) hist[n] = hist[n-1];
      hist[0] = a;
    end
    check(datardy == m_rdy, $sformatf("datardy=%0b expected %0b", datardy, m_rdy));
  endtask

  // An integration period of len clocks ended by intg; outck is high with
  // probability 1/ock_div (0: never).
  task automatic period(int len, bit bm, int ock_div);
    for (int c = 0; c < len; c++)
      cycle(0, 0, bm, ock_div != 0 && ($urandom % ock_div) == 0);
    cycle(0, 1, bm, 0);
  endtask

  initial begin
    m_rdy = 0;
    for (int n = 0; n < N; n++) begin hist[n] = '0; sum[n] = 0; snap[n] = '0; end
    cycle(1, 0, 0, 0);
    // Ordinary periods, reads alternating word / byte.
    for (int p = 0; p < 12; p++) period(300 + int'($urandom % 1500), p[0], 1 + p % 3);
    // A short period with a slow reader: the next dump arrives mid-read.
    period(40, 0, 0);
    period(40, 1, 4);
    period(600, 0, 1);
    // Reset in the middle of a read.
    for (int c = 0; c < 10; c++) cycle(0, 0, 0, 1);
    cycle(1, 0, 0, 0);
    for (int c = 0; c < 5; c++) cycle(0, 0, 0, 1);
    // A long period to reach the upper counter bits, then a full read.
    period(200000, 1, 2);
    period(500, 0, 1);
    for (int c = 0; c < 200; c++) cycle(0, 0, 0, 1);
    check(!datardy, "all reads completed");
    $display("integrate=%0d dump=%0d reset=%0d start_read=%0d end_read=%0d dump_byte=%0d dump_word=%0d noop=%0d dump_during_read=%0d",
             n_integrate, n_dump, n_reset, n_start, n_end, n_byte, n_word, n_noop, n_overrun);
    check(n_integrate > 0, "integrate happened");
    check(n_dump > 0,      "dump happened");
    check(n_reset > 1,     "reset happened");
    check(n_start > 0,     "start_read happened");
    check(n_end > 0,       "end_read happened");
    check(n_byte > 0,      "dump_byte happened");
    check(n_word > 0,      "dump_word happened");
    check(n_noop > 0,      "noop happened");
    check(n_overrun > 0,   "dump during a read happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
