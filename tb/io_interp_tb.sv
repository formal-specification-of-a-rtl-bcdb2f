// io_interp_tb: the IO interpreter reading out word and byte serial.
//
// The testbench plays the shared link: it fills the 32 result registers with
// random values, raises datardy and begin_rd, drops begin_rd on start_read
// and datardy on end_read.  Expected transfers are listed independently: in
// word mode bits 23:8 of registers 32 down to 1, in byte mode bits 23:16 then
// 15:8 of each register from 32 down to 1.  outck is random.  Each read must
// give exactly the expected transfers, and must end one clock after the last
// outck transfer.  A read restarted by new data and a reset in mid-read are
// also exercised.
module io_interp_tb;
  import corr_pkg::*;

  localparam int N = 32;
  logic   clk = 0, rn, byte_mode, outck, datardy, begin_rd;
  count_t sr [N];
  logic   start_read, end_read, borw;
  word_t  out;
  ctr_t   counter;
  io_op_e op;
  int checks = 0, failures = 0;

  io_interp #(.N(N)) dut (.clk(clk), .rn(rn), .byte_mode(byte_mode), .outck(outck),
                          .datardy(datardy), .begin_rd(begin_rd), .sr(sr),
                          .start_read(start_read), .end_read(end_read), .out(out),
                          .counter(counter), .borw(borw), .op(op));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // One read of fresh data.  abort_at >= 0 resets the interpreter after that
  // many transfers; restart_at >= 0 announces new data after that many.
  task automatic do_read(bit bmode, int abort_at, int restart_at);
    word_t exp_q[$];
    int    k, busy;
    for (int n = 0; n < N; n++) sr[n] = count_t'($urandom);
    for (int ch = N; ch >= 1; ch--) begin
      if (bmode) begin
        exp_q.push_back(word_t'(sr[ch-1][23:16]));
        exp_q.push_back(word_t'(sr[ch-1][15:8]));
      end else begin
        exp_q.push_back(sr[ch-1][23:8]);
      end
    end
    byte_mode = bmode;
    datardy = 1; begin_rd = 1; outck = 0;
    #1;
    check(start_read && op == IO_START_READ, "start_read on fresh data");
    @(posedge clk); #1;
    begin_rd = 0;
    byte_mode = !bmode;   // must no longer matter
    check(borw == bmode, "borw latched at start");
    check(counter == ctr_t'(bmode ? 2 * N : N), "counter loaded");
    k = 0; busy = 0;
    while (1) begin
      outck = ($urandom % 3) != 0;
      if (abort_at >= 0 && k == abort_at) rn = 1;
      if (restart_at >= 0 && k == restart_at) begin
        // New data arrives: the read restarts from the top.
        begin_rd = 1;
        #1;
        check(start_read, "restart on new data");
        @(posedge clk); #1;
        begin_rd = 0;
        check(counter == ctr_t'((!bmode) ? 2 * N : N), "counter reloaded on restart");
        return;
      end
      #1;
      if (rn) begin
        check(op == IO_RESET, "reset has priority");
        @(posedge clk); #1;
        rn = 0;
        check(counter == '0 && out == '0 && borw == 0, "reset state");
        datardy = 0;
        return;
      end
      if (end_read) break;
      check(!outck || op == (bmode ? IO_DUMP_BYTE : IO_DUMP_WORD), "transfer decoded");
      check(outck || op == IO_NOOP, "noop without outck");
      @(posedge clk); #1;
      busy++;
      if (outck) begin
        word_t e;
        e = exp_q.pop_front();
        check(out == e, $sformatf("transfer %0d out=%h expected %h", k, out, e));
        k++;
      end
    end
    check(k == (bmode ? 2 * N : N), $sformatf("transfers %0d", k));
    check(exp_q.size() == 0, "all values read");
    check(counter == '0, "counter at zero at end");
    @(posedge clk); #1;
    datardy = 0;
    outck = 0;
    #1;
    check(op == IO_NOOP && !end_read, "idle after read");
  endtask

  initial begin
    rn = 1; byte_mode = 0; outck = 0; datardy = 0; begin_rd = 0;
    for (int n = 0; n < N; n++) sr[n] = '0;
    @(posedge clk); #1;
    rn = 0;
    check(counter == '0 && out == '0 && !borw, "after reset");
    for (int r = 0; r < 6; r++) do_read(r[0], -1, -1);
    do_read(0, 10, -1);
    do_read(1, -1, 20);
    // The restarted read continues with new data in word mode.
    do_read(0, -1, -1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
