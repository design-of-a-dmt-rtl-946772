// tb_chest_feq: a 64-tone model link. Each tone has a random complex channel
// gain H(k); the FFT output is Y = A H X (+ a little noise). Two channel-
// estimation symbols carry the training QPSK of an independent model of the
// training sequence; then data symbols carry random rectangular-QAM points
// (0..6 bits per tone). Checks: every demapped word is the transmitted one,
// the equalized value is close to X, decisions leave 3 cycles after their
// tone, and after a step change of the channel the LMS adaptation brings the
// equalizer error back down (mean error of the last symbol well below that
// of the first symbol after the change). With adaptation off, the error must
// stay.
module tb_chest_feq;
  import vdsl_pkg::*;
  localparam int NT = 64, AW = TONE_W;
  localparam real A = 1000.0;
  logic clk = 0, rst_n = 0, ce_first = 0, ce_init = 0, adapt_en = 1, tone_valid = 0;
  train_state_e tstate = TS_ACQ;
  logic [2:0] avg_log = 3'd1;
  logic [4:0] mu_shift = 5'd6;
  logic [AW-1:0] tone_idx = '0;
  fft_cplx_t y = '0;
  logic [BITS_W-1:0] nbits = '0;
  logic dec_valid, ce_wr;
  logic [AW-1:0] dec_tone;
  logic [BITS_W-1:0] dec_nbits;
  logic [DEMAP_W-1:0] dec_bits;
  logic signed [XW-1:0] xh_re, xh_im;
  int checks = 0, failures = 0, cyc = 0;

  chest_feq #(.NT(NT), .AW(AW)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real hr [NT], hi [NT];
  int  ba [NT];
  // expected decisions
  int  e_tone [$], e_bits [$], e_cyc [$];
  real e_xr [$], e_xi [$];
  real err_sum;
  int  n_ce_wr = 0;

  // training sequence model: d(n) = d(n-4) ^ d(n-9), nine ones at start
  bit seq [$];
  function automatic bit nextbit();
    bit b;
    b = seq[seq.size() - 4] ^ seq[seq.size() - 9];
    seq.push_back(b);
    return b;
  endfunction

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  always @(posedge clk) begin
    #1;
    if (ce_wr) n_ce_wr++;
    if (dec_valid) begin
      real dx, dy;
      checks++;
      if (e_tone.size() == 0 || int'(dec_tone) != e_tone[0] || int'(dec_bits) != e_bits[0]
          || cyc != e_cyc[0]) begin
        failures++;
        $display("tone %0d bits %0d exp tone %0d bits %0d cyc %0d/%0d", dec_tone, dec_bits,
                 e_tone[0], e_bits[0], cyc, e_cyc[0]);
      end
      dx = real'(xh_re) / 4096.0 - e_xr[0];
      dy = real'(xh_im) / 4096.0 - e_xi[0];
      err_sum += dx * dx + dy * dy;
      void'(e_tone.pop_front()); void'(e_bits.pop_front()); void'(e_cyc.pop_front());
      void'(e_xr.pop_front()); void'(e_xi.pop_front());
    end
  end

  task automatic send(real xr, real xi, int k, real noise);
    real yr, yi;
    int  nr, ni;
    nr = $urandom_range(0, 200); ni = $urandom_range(0, 200);
    yr = A * (hr[k] * xr - hi[k] * xi) + noise * (nr - 100) / 100.0;
    yi = A * (hr[k] * xi + hi[k] * xr) + noise * (ni - 100) / 100.0;
    y.re = FFT_W'(int'(yr));
    y.im = FFT_W'(int'(yi));
  endtask

  task automatic ce_symbol(bit first);
    for (int k = 0; k < NT; k++) begin
      bit b0, b1;
      @(negedge clk);
      b0 = nextbit(); b1 = nextbit();
      tone_valid = 1; tone_idx = AW'(k); tstate = TS_CHEST; ce_first = first;
      send(b0 ? -1.0 : 1.0, b1 ? -1.0 : 1.0, k, 0.0);
    end
    @(negedge clk) tone_valid = 0;
    repeat (40) @(negedge clk);
  endtask

  task automatic data_symbol(real noise, output real mse);
    err_sum = 0.0;
    for (int k = 0; k < NT; k++) begin
      int mi, mq, ii, iq;
      real g, xr, xi;
      @(negedge clk);
      mi = (ba[k] + 1) / 2; mq = ba[k] / 2;
      g = $sqrt(((4.0 ** mi - 1.0) + (4.0 ** mq - 1.0)) / 6.0);
      ii = (mi == 0) ? 0 : $urandom_range(0, (1 << mi) - 1);
      iq = (mq == 0) ? 0 : $urandom_range(0, (1 << mq) - 1);
      xr = (mi == 0) ? 0.0 : (2 * ii - ((1 << mi) - 1)) / g;
      xi = (mq == 0) ? 0.0 : (2 * iq - ((1 << mq) - 1)) / g;
      if (ba[k] == 0) begin xr = 1.0; xi = 1.0; end   // unloaded tone: fixed point
      tone_valid = 1; tone_idx = AW'(k); tstate = adapt_en ? TS_DATA : TS_HOLD;
      nbits = BITS_W'(ba[k]);
      send(xr, xi, k, noise);
      e_tone.push_back(k); e_bits.push_back((ba[k] == 0) ? 0 : ((iq << mi) | ii));
      e_cyc.push_back(cyc + 3); e_xr.push_back(xr); e_xi.push_back(xi);
    end
    @(negedge clk) tone_valid = 0;
    repeat (10) @(negedge clk);
    mse = err_sum / NT;
  endtask

  initial begin
    real m0, m1, m_first, m_last, m_hold0, m_hold1;
    for (int k = 0; k < NT; k++) begin
      real mag, ph;
      mag = $urandom_range(500, 2000) / 1000.0;
      ph  = $urandom_range(0, 6283) / 1000.0;
      hr[k] = mag * $cos(ph); hi[k] = mag * $sin(ph);
      ba[k] = $urandom_range(0, 6);
    end
    repeat (9) seq.push_back(1'b1);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) ce_init = 1;
    @(negedge clk) ce_init = 0;
    ce_symbol(1);
    ce_symbol(0);
    checks++;
    if (n_ce_wr != 2 * NT) begin failures++; $display("estimates written %0d", n_ce_wr); end
    data_symbol(2.0, m0);
    data_symbol(2.0, m1);
    checks++;
    if (m0 > 1e-3) begin failures++; $display("mse after estimation %f", m0); end
    // channel step: 3 percent gain, 0.03 rad
    for (int k = 0; k < NT; k++) begin
      real r, i;
      r = hr[k]; i = hi[k];
      hr[k] = 1.03 * (r * $cos(0.03) - i * $sin(0.03));
      hi[k] = 1.03 * (r * $sin(0.03) + i * $cos(0.03));
    end
    data_symbol(2.0, m_first);
    for (int s = 0; s < 12; s++) data_symbol(2.0, m_last);
    $display("mse: est %f, after step %f, after adaptation %f", m0, m_first, m_last);
    checks++;
    if (!(m_last < 0.5 * m_first)) begin failures++; $display("LMS did not converge"); end
    // step again with adaptation off: the error must stay
    adapt_en = 0;
    for (int k = 0; k < NT; k++) begin
      real r, i;
      r = hr[k]; i = hi[k];
      hr[k] = 1.03 * (r * $cos(0.03) - i * $sin(0.03));
      hi[k] = 1.03 * (r * $sin(0.03) + i * $cos(0.03));
    end
    data_symbol(2.0, m_hold0);
    for (int s = 0; s < 4; s++) data_symbol(2.0, m_hold1);
    checks++;
    if (m_hold1 < 0.5 * m_hold0) begin failures++; $display("adapted while frozen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
