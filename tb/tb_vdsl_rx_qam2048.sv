// tb_vdsl_rx_qam2048: end-to-end test of the receiver with dense
// constellations at the highest VDSL payload rate: tones 32..QHI carry
// 2048-QAM (11 bits), tones up to MHI 256-QAM (8 bits), the rest of the band
// 16-QAM (4 bits), about 16000 bits per symbol. At 4000 symbols per second
// that is 64 Mbit/s, above the 56.2 Mbit/s (14050 bits per symbol) of a
// 300 m loop with the optional bands, so the check requires at least 14050.
// Otherwise the same link as the full-size end-to-end test (8192-point FFT,
// 640-sample cyclic prefix, 4096 tones, default parameters); the 11-bit
// tones are counted and checked separately.
//
// Transmitter model: DMT symbols built by an inverse FFT over tones 32..2400
// (up to 0.29 of the sample rate; the receiver's cubic interpolator is not
// accurate enough for dense loading much above that), each with its cyclic
// prefix:
// training symbols repeating one QPSK pattern, one synchro symbol (every tone
// inverted), two channel-estimation symbols carrying the training sequence,
// then data symbols carrying random QAM (loading as above). Pilots 600 and
// 1200 carry 1+j (inverted in the synchro symbol).
// Channel model: three-tap echo channel, sampling clock offset of EPS (the
// receiver's ADC samples at t = n(1-EPS), the transmitted signal evaluated
// there by windowed-sinc interpolation), 12-bit quantization. After the
// checked data symbols the offset changes sign to +EPS for the remaining
// (unchecked) data symbols, so the loop has to slip the other way.
// FFT model: collects the samples the receiver marks with fft_enable, takes a
// floating-point FFT and returns the 4096 tones one per clock, first tone
// flagged by stating.
// Checks: every demapped word of every data symbol against the transmitted
// bits (at most a few errors allowed from the channel model's own noise),
// the receiver reaches the data state, and each mechanism happened: boundary
// detection, preamble end, channel-estimate writes, timing-error outputs,
// late and early slips of the timing loop, LMS coefficient updates.
module tb_vdsl_rx_qam2048;
  import vdsl_pkg::*;
  localparam int N = N_FFT, NCP = N_CP, NT = N_TONES, SYM = N + NCP;
  localparam int K1 = PILOT_PRIMARY, K2 = 1200, TLO = 32, THI = 2400;
  localparam int NTRAIN = 12, NMED = 2, NDATA = 6, NEXTRA = 12;
  // symbol after which the clock offset changes sign (tracked, not checked)
  localparam int NSWITCH = NTRAIN + 1 + NMED + NDATA + 1;
  localparam int NSYM = NTRAIN + 1 + NMED + NDATA + NEXTRA;
  localparam real EPS = 100.0e-6;
  localparam int QHI = 400;   // highest 2048-QAM tone
  localparam int MHI = 1400;  // highest 256-QAM tone
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0, restart = 0, adc_valid = 0;
  logic signed [SAMPLE_W-1:0] adc_data = '0;
  logic fft_enable;
  logic signed [SAMPLE_W-1:0] fft_in;
  logic fft_out_valid = 0, stating = 0;
  fft_cplx_t fft_out = '0;
  logic bat_we = 0;
  logic [TONE_W-1:0] bat_addr = '0;
  logic [BITS_W-1:0] bat_data = '0;
  logic scan = 0, scan_in = 0, scan_out;
  logic dec_valid;
  logic [TONE_W-1:0] dec_tone;
  logic [BITS_W-1:0] dec_nbits;
  logic [DEMAP_W-1:0] dec_bits;
  logic signed [XW-1:0] dec_xh_re, dec_xh_im;
  logic locked, sb_success, preamble_end, ce_wr, ted_valid, slip_late, slip_early;
  train_state_e tstate;
  logic signed [PHASE_W-1:0] ted_err;
  logic signed [23:0] timing_freq;

  vdsl_rx_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_sb = 0, n_pe = 0, n_ce = 0, n_ted = 0, n_late = 0, n_early = 0, n_lms = 0;
  int n_dec = 0, n_bad = 0, n_dsym = 0, n_q = 0, n_qbad = 0, bits_sym = 0;

  initial begin
    repeat (NSYM * SYM + 40 * SYM) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------ FFT
  real tw_c [N / 2], tw_s [N / 2];
  function automatic int bitrev(int v, int bits);
    int r = 0;
    for (int b = 0; b < bits; b++) r |= ((v >> b) & 1) << (bits - 1 - b);
    return r;
  endfunction
  // in place; sgn = -1 forward, +1 inverse (unscaled)
  task automatic fft(ref real ar [N], ref real aim [N], input int sgn);
    int lg = $clog2(N);
    for (int i = 0; i < N; i++) begin
      int j = bitrev(i, lg);
      if (j > i) begin
        real t;
        t = ar[i]; ar[i] = ar[j]; ar[j] = t;
        t = aim[i]; aim[i] = aim[j]; aim[j] = t;
      end
    end
    for (int len = 2; len <= N; len *= 2) begin
      int step = N / len;
      for (int s = 0; s < N; s += len)
        for (int k = 0; k < len / 2; k++) begin
          real wr, wi, xr, xi;
          wr = tw_c[k * step]; wi = sgn * tw_s[k * step];
          xr = ar[s + k + len / 2] * wr - aim[s + k + len / 2] * wi;
          xi = ar[s + k + len / 2] * wi + aim[s + k + len / 2] * wr;
          ar[s + k + len / 2] = ar[s + k] - xr; aim[s + k + len / 2] = aim[s + k] - xi;
          ar[s + k] = ar[s + k] + xr;           aim[s + k] = aim[s + k] + xi;
        end
    end
  endtask

  // ------------------------------------------------------ transmitter model
  bit seq [$];
  function automatic bit nextbit();
    bit b;
    b = seq[seq.size() - 4] ^ seq[seq.size() - 9];
    seq.push_back(b);
    return b;
  endfunction
  function automatic void seq_reset();
    seq.delete();
    repeat (9) seq.push_back(1'b1);
  endfunction

  int  ba [NT];
  int  exp_bits [NDATA][NT];
  real txs [];
  real tx_scale, fft_scale;

  function automatic bit used(int k);
    return k >= TLO && k <= THI;
  endfunction

  task automatic build_symbol(int s, ref real xr [N], ref real xi [N]);
    for (int i = 0; i < N; i++) begin xr[i] = 0.0; xi[i] = 0.0; end
    if (s <= NTRAIN) begin
      // training pattern (same every symbol); synchro = inverted
      seq_reset();
      for (int k = 0; k < NT; k++) begin
        bit b0, b1;
        b0 = nextbit(); b1 = nextbit();
        if (used(k)) begin xr[k] = b0 ? -1.0 : 1.0; xi[k] = b1 ? -1.0 : 1.0; end
      end
      if (s == NTRAIN) for (int k = 0; k < NT; k++) begin xr[k] = -xr[k]; xi[k] = -xi[k]; end
    end else if (s <= NTRAIN + NMED) begin
      if (s == NTRAIN + 1) seq_reset();
      for (int k = 0; k < NT; k++) begin
        bit b0, b1;
        b0 = nextbit(); b1 = nextbit();
        if (used(k)) begin xr[k] = b0 ? -1.0 : 1.0; xi[k] = b1 ? -1.0 : 1.0; end
      end
    end else begin
      int d = s - NTRAIN - NMED - 1;
      for (int k = 0; k < NT; k++) begin
        if (ba[k] > 0) begin
          int mi, mq, ii, iq;
          real g;
          mi = (ba[k] + 1) / 2; mq = ba[k] / 2;
          g = $sqrt(((4.0 ** mi - 1.0) + (4.0 ** mq - 1.0)) / 6.0);
          ii = $urandom_range(0, (1 << mi) - 1);
          iq = (mq == 0) ? 0 : $urandom_range(0, (1 << mq) - 1);
          xr[k] = (2 * ii - ((1 << mi) - 1)) / g;
          xi[k] = (mq == 0) ? 0.0 : (2 * iq - ((1 << mq) - 1)) / g;
          if (d < NDATA) exp_bits[d][k] = (iq << mi) | ii;
        end
      end
    end
    // pilots
    xr[K1] = (s == NTRAIN) ? -1.0 : 1.0; xi[K1] = xr[K1];
    xr[K2] = xr[K1];                     xi[K2] = xr[K1];
    // Hermitian extension
    for (int k = 1; k < NT; k++) begin xr[N - k] = xr[k]; xi[N - k] = -xi[k]; end
    xr[0] = 0.0; xi[0] = 0.0; xr[NT] = 0.0; xi[NT] = 0.0;
  endtask

  // ------------------------------------------------------ channel model
  real h [3] = '{1.0, 0.25, -0.1};
  function automatic real txat(real t);
    // band-limited interpolation: 16-tap Hann-windowed sinc
    int i; real f, acc, a, w;
    if (t < 0.0) return 0.0;
    i = int'($floor(t));
    f = t - i;
    acc = 0.0;
    for (int j = -7; j <= 8; j++) begin
      if (i + j >= 0 && i + j < txs.size()) begin
        a = real'(j) - f;
        w = 0.5 + 0.5 * $cos(PI * a / 8.5);
        acc += txs[i + j] * w * ((a > -1e-9 && a < 1e-9) ? 1.0 : $sin(PI * a) / (PI * a));
      end
    end
    return acc;
  endfunction

  // ------------------------------------------------------ FFT model process
  real fr [N], fi [N];
  int  fcnt = 0;
  fft_cplx_t outq [$];
  logic      outs [$];
  function automatic logic signed [FFT_W-1:0] sat15(real v);
    int q = int'(v);
    if (q > 16383) q = 16383;
    if (q < -16383) q = -16383;
    return FFT_W'(q);
  endfunction

  always @(posedge clk) begin
    if (rst_n && fft_enable) begin
      fr[fcnt] = real'(fft_in); fi[fcnt] = 0.0;
      fcnt++;
      if (fcnt == N) begin
        fcnt = 0;
        fft(fr, fi, -1);
        for (int k = 0; k < NT; k++) begin
          fft_cplx_t c;
          c.re = sat15(fr[k] * fft_scale); c.im = sat15(fi[k] * fft_scale);
          outq.push_back(c); outs.push_back(k == 0);
        end
      end
    end
  end

  always @(negedge clk) begin
    if (outq.size() > 0) begin
      fft_out_valid <= 1'b1;
      fft_out <= outq.pop_front();
      stating <= outs.pop_front();
    end else begin
      fft_out_valid <= 1'b0;
      stating <= 1'b0;
    end
  end

  // ------------------------------------------------------ monitors
  int dsym = -1;
  always @(posedge clk) begin
    if (rst_n) begin
      n_sb    += int'(sb_success);
      n_pe    += int'(preamble_end);
      n_ce    += int'(ce_wr);
      n_ted   += int'(ted_valid);
      n_late  += int'(slip_late);
      n_early += int'(slip_early);
      n_lms   += int'(dut.u_feq.wr_en && !dut.u_feq.ca_v);
      if (dec_valid) begin
        if (dec_tone == '0) begin dsym++; n_dsym++; end
        if (dsym >= 0 && dsym < NDATA && dec_nbits != '0) begin
          n_dec++;
          if (dec_nbits == BITS_W'(11)) n_q++;
          if (int'(dec_bits) != exp_bits[dsym][dec_tone]) begin
            n_bad++;
            if (dec_nbits == BITS_W'(11)) n_qbad++;
            if (n_bad < 10) $display("symbol %0d tone %0d bits %0d exp %0d", dsym, dec_tone,
                                     dec_bits, exp_bits[dsym][dec_tone]);
          end
        end
      end
    end
  end

  // ------------------------------------------------------ stimulus
  rx_params_t prm;
  initial begin
    real xr [N], xi [N];
    real e2;
    int  pos;
    for (int i = 0; i < N / 2; i++) begin
      tw_c[i] = $cos(2.0 * PI * i / N); tw_s[i] = $sin(2.0 * PI * i / N);
    end
    for (int k = 0; k < NT; k++)
      ba[k] = (used(k) && k != K1 && k != K2) ? ((k <= QHI) ? 11 : (k <= MHI) ? 8 : 4) : 0;
    // transmit stream
    txs = new[NSYM * SYM + 16];
    pos = 0;
    for (int s = 0; s < NSYM; s++) begin
      build_symbol(s, xr, xi);
      if (s == 0) begin
        e2 = 0.0;
        for (int k = 0; k < N; k++) e2 += xr[k] * xr[k] + xi[k] * xi[k];
        tx_scale = 250.0 / $sqrt(e2);         // 250 LSB rms at the ADC
        fft_scale = 3000.0 / (N * tx_scale);  // |Y| about 3000 |H X|
      end
      fft(xr, xi, 1);
      for (int n = 0; n < NCP; n++) txs[pos + n] = tx_scale * xr[N - NCP + n];
      for (int n = 0; n < N; n++)   txs[pos + NCP + n] = tx_scale * xr[n];
      pos += SYM;
    end
    for (int i = pos; i < txs.size(); i++) txs[i] = 0.0;

    // reset, bit allocation, parameters
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < NT; k++) begin
      @(negedge clk);
      bat_we = 1; bat_addr = TONE_W'(k); bat_data = BITS_W'(ba[k]);
    end
    @(negedge clk) bat_we = 0;
    prm = PARAMS_DEFAULT;
    prm.sb_threshold = 36'd15000000;
    prm.pilot_second = TONE_W'(K2);
    prm.lf_kp = 8'sd0;
    prm.lf_ki = -8'sd2;
    prm.mu_shift = 5'd9;
    for (int b = PARAMS_W - 1; b >= 0; b--) begin
      @(negedge clk) scan = 1; scan_in = prm[b];
    end
    @(negedge clk) scan = 0;
    checks++;
    if (dut.params !== prm) begin failures++; $display("parameter load failed"); end

    // ADC stream
    for (int n = 0; n < NSYM * SYM; n++) begin
      real t, v;
      int q;
      @(negedge clk);
      if (n < NSWITCH * SYM) t = n * (1.0 - EPS);
      else t = NSWITCH * SYM * (1.0 - EPS) + (n - NSWITCH * SYM) * (1.0 + EPS);
      v = h[0] * txat(t) + h[1] * txat(t - 1.0) + h[2] * txat(t - 2.0);
      q = int'(v);
      if (q > 2047) q = 2047;
      if (q < -2048) q = -2048;
      adc_valid = 1;
      adc_data = SAMPLE_W'(q);
    end
    repeat (2 * SYM) @(negedge clk);

    $display("mechanisms: sb=%0d preamble_end=%0d ce_writes=%0d ted=%0d slips late=%0d early=%0d lms=%0d",
             n_sb, n_pe, n_ce, n_ted, n_late, n_early, n_lms);
    $display("decisions: %0d words in %0d data symbols, %0d wrong; freq=%0d", n_dec, n_dsym, n_bad, timing_freq);
    checks++; if (n_sb == 0)  begin failures++; $display("no boundary detection"); end
    checks++; if (n_pe == 0)  begin failures++; $display("no preamble end"); end
    checks++; if (n_ce != NMED * NT) begin failures++; $display("channel estimates %0d", n_ce); end
    checks++; if (n_ted == 0) begin failures++; $display("no timing error"); end
    checks++; if (n_late == 0)  begin failures++; $display("no late slip (dropped sample)"); end
    checks++; if (n_early == 0) begin failures++; $display("no early slip (window move)"); end
    checks++; if (n_lms == 0) begin failures++; $display("no LMS update"); end
    checks++; if (!locked || tstate != TS_DATA) begin failures++; $display("not in data state"); end
    checks++; if (n_dsym < NDATA) begin failures++; $display("only %0d data symbols", n_dsym); end
    checks++; if (n_dec < NDATA * 1000) begin failures++; $display("too few decisions"); end
    for (int k = 0; k < NT; k++) bits_sym += ba[k];
    $display("2048-QAM: %0d words, %0d wrong; %0d bits per symbol", n_q, n_qbad, bits_sym);
    checks++; if (bits_sym < 14050) begin failures++; $display("loading below 14050 bits"); end
    checks++; if (n_q < NDATA * (QHI - 32)) begin failures++; $display("too few 2048-QAM words"); end
    checks++; if (n_qbad * 1000 > n_q) begin failures++; $display("too many wrong 2048-QAM words"); end
    checks++; if (n_bad * 1000 > n_dec) begin failures++; $display("too many wrong words"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
