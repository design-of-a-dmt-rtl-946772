// tb_rx_control: locks the control unit with a given max_age and checks the
// FFT window (fft_enable) cycle by cycle against an independent position
// model derived from where the correlation maximum was, including window
// moves after slip_late / slip_early, which must wait for the prefix gap
// before the window so that every window has exactly N samples. Then checks the training-state
// sequence at FFT symbol starts: ACQ until the preamble end, CHEST for 2
// symbols with ce_first on the first, DATA, HOLD when adaptation is off,
// and that restart drops the lock.
module tb_rx_control;
  import vdsl_pkg::*;
  localparam int N = 16, NCP = 4, BO = 1, LAT = 3, SYM = N + NCP;
  logic clk = 0, rst_n = 0, restart = 0, samp_valid = 1, sb_success = 0;
  logic [$clog2(SYM)-1:0] max_age = '0;
  logic slip_late = 0, slip_early = 0, stating = 0, preamble_end = 0;
  logic [2:0] avg_log = 3'd1;
  logic adapt_en = 1;
  logic search_en, locked, fft_enable, ce_first, ce_init;
  train_state_e tstate;
  int checks = 0, failures = 0, cyc = 0;
  int n_late = 0, n_early = 0;

  rx_control #(.N(N), .NCP(NCP), .BACKOFF(BO), .CORR_LAT(LAT)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_state(train_state_e ts, bit first, string what);
    checks++;
    if (tstate != ts || ce_first != first) begin
      failures++;
      $display("%s: tstate=%0d ce_first=%0b exp %0d %0b", what, tstate, ce_first, ts, first);
    end
  endtask

  initial begin
    int p, off, m, ph, tp, wcnt;
    bit started;
    bit exp;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (!search_en || locked) begin failures++; $display("not searching after reset"); end
    // lock: sb_success in cycle T with max_age m; the maximum was the sample
    // of cycle T - LAT - m, the last sample of a symbol body
    m = 7;
    max_age = 5'(m);
    sb_success = 1;
    p = cyc - LAT - m;
    @(negedge clk);
    sb_success = 0;
    off = 0; tp = 0; wcnt = 0; started = 0;
    for (int i = 0; i < 12 * SYM; i++) begin
      // position of this cycle's sample within its symbol (0 = first prefix sample)
      ph = (((cyc - p - 1 - off) % SYM) + SYM) % SYM;
      // the first window is the first whole one after the lock
      if (ph == 0) started = 1;
      exp = started && (ph >= NCP - BO) && (ph < NCP - BO + N);
      checks++;
      if (fft_enable != exp || !locked) begin
        failures++;
        $display("cyc %0d ph %0d fft_enable=%0b exp %0b", cyc, ph, fft_enable, exp);
      end
      if (fft_enable) wcnt++;
      if (ph == NCP - BO + N - 1 && exp) begin
        checks++;
        if (wcnt != N) begin failures++; $display("window of %0d samples", wcnt); end
        wcnt = 0;
      end
      slip_late = (i == 3 * SYM + 5) || (i == 5 * SYM + 2) || (i == 5 * SYM + 3);
      slip_early = (i == 8 * SYM + 9);
      @(negedge clk);
      // a pending slip is applied at a gap sample (before the window)
      if (ph >= 1 && ph + 2 <= NCP - BO && tp > 0) begin off++; tp--; n_late++; end
      else if (ph >= 1 && ph + 2 <= NCP - BO && tp < 0) begin off--; tp++; n_early++; end
      if (slip_late) tp++;
      if (slip_early) tp--;
      slip_late = 0; slip_early = 0;
    end
    // training-state sequence
    for (int s = 0; s < 7; s++) begin
      stating = 1;
      #1;
      case (s)
        0, 1: expect_state(TS_ACQ, 0, "acq");
        2:    expect_state(TS_CHEST, 1, "first chest");
        3:    expect_state(TS_CHEST, 0, "second chest");
        4:    expect_state(TS_DATA, 0, "data");
        5:    expect_state(TS_DATA, 0, "data");
        default: expect_state(TS_HOLD, 0, "hold");
      endcase
      @(negedge clk);
      stating = 0;
      repeat (4) @(negedge clk);
      #1;
      case (s)
        0, 1: expect_state(TS_ACQ, 0, "acq mid");
        2:    expect_state(TS_CHEST, 1, "first chest mid");
        3:    expect_state(TS_CHEST, 0, "second chest mid");
        4, 5: expect_state(TS_DATA, 0, "data mid");
        default: expect_state(TS_HOLD, 0, "hold mid");
      endcase
      if (s == 1) begin
        @(negedge clk) preamble_end = 1;
        #1;
        checks++;
        if (!ce_init) begin failures++; $display("no ce_init"); end
        @(negedge clk) preamble_end = 0;
      end
      if (s == 5) adapt_en = 0;
      repeat (5) @(negedge clk);
    end
    @(negedge clk) restart = 1;
    @(negedge clk) restart = 0;
    #1;
    checks++;
    if (locked || !search_en || fft_enable || tstate != TS_ACQ) begin
      failures++; $display("restart did not drop the lock");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc++;
endmodule
