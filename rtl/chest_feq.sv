// chest_feq: channel estimation, adaptive FEQ and decision (one tone per clock).
//
// The FFT output Y(k) = H(k) X(k) + I(k) arrives one tone per clock with its
// tone index and bit allocation. The training state selects the work:
//
//  TS_CHEST  channel estimation. The known QPSK training point X(k) comes from
//            the channel-estimation scrambler. G = X / Y is formed as
//            X conj(Y) / |Y|^2: the numerator needs only conditional two's
//            complements of Y's parts, the denominator goes through the
//            pipelined 1/X divider (2**41 / |Y|^2). Each estimate, divided by
//            2**avg_log, is written (first symbol, ce_first) or added to the
//            tone's coefficient, averaging 2**avg_log symbols.
//  TS_DATA   decision with adaptation. Xh = G Y, the gain / decoding table gives
//  TS_HOLD   the bits and the error e = X - Xh; in TS_DATA (and adapt_en) the
//            coefficient is updated by LMS, G += mu e conj(Y), mu = 2**-(mu_shift+18).
//  TS_ACQ    nothing.
//
// Formats: Y integer (15 bits); Xh and e normalized, XF fraction bits;
// G = coef * 2**-GF. The structure follows the design's channel-estimation /
// FEQ diagram (scrambler, conditional complementor, 1/X divider, accumulate
// with averaging, multiply, gain, decoding table, error times Y times mu);
// the number formats, the conjugate in the LMS update and the pipeline are this
// implementation's. Timing: a decision leaves 3 cycles after its tone; a
// channel estimate is written Q_W+2 = 28 cycles after its tone.
// Tones of consecutive symbols must be at least that far apart when the state
// changes from TS_CHEST to data.
module chest_feq
  import vdsl_pkg::*;
#(
  parameter int unsigned NT = N_TONES,
  parameter int unsigned AW = TONE_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  train_state_e       tstate,
  input  logic               ce_first,    // first channel-estimation symbol
  input  logic               ce_init,     // reseed the training sequence
  input  logic [2:0]         avg_log,
  input  logic [4:0]         mu_shift,
  input  logic               adapt_en,
  input  logic               tone_valid,
  input  logic [AW-1:0]      tone_idx,
  input  fft_cplx_t          y,
  input  logic [BITS_W-1:0]  nbits,
  output logic               dec_valid,
  output logic [AW-1:0]      dec_tone,
  output logic [BITS_W-1:0]  dec_nbits,
  output logic [DEMAP_W-1:0] dec_bits,
  output logic signed [XW-1:0] xh_re,
  output logic signed [XW-1:0] xh_im,
  output logic               ce_wr        // a channel estimate was stored
);
  localparam int unsigned PW    = FFT_W + 2;       // X conj(Y) component
  localparam int unsigned DEN_W = 2 * FFT_W;       // |Y|^2
  localparam int unsigned K     = 41;              // divider numerator 2**K
  localparam int unsigned Q_W   = 26;
  localparam int unsigned TAG_W = AW + 2 * PW + 4;
  localparam logic signed [63:0] GMAX = (64'sd1 <<< (GW - 1)) - 1;
  localparam logic signed [63:0] GMIN = -(64'sd1 <<< (GW - 1));

  function automatic logic signed [GW-1:0] gsat(input logic signed [63:0] v);
    if (v > GMAX)      return GMAX[GW-1:0];
    else if (v < GMIN) return GMIN[GW-1:0];
    else               return v[GW-1:0];
  endfunction

  localparam logic signed [63:0] XMAX = (64'sd1 <<< (XW - 1)) - 1;
  function automatic logic signed [XW-1:0] xsat(input logic signed [63:0] v);
    if (v > XMAX)       return XMAX[XW-1:0];
    else if (v < -XMAX) return -XMAX[XW-1:0];
    else                return v[XW-1:0];
  endfunction

  // ------------------------------------------------------------ estimation
  logic       is_ce, is_data;
  logic [1:0] tr_bits;
  assign is_ce   = tone_valid && (tstate == TS_CHEST);
  assign is_data = tone_valid && (tstate == TS_DATA || tstate == TS_HOLD);

  ce_scrambler u_scr (
    .clk, .rst_n, .init(ce_init), .advance(is_ce), .bits(tr_bits)
  );

  // Conditional two's complementor: X conj(Y) for X = (+-1) + j(+-1).
  logic signed [PW-1:0] p_re, p_im, yr, yi;
  logic [DEN_W-1:0]     mag2;
  always_comb begin
    yr   = PW'(y.re);
    yi   = PW'(y.im);
    p_re = (tr_bits[0] ? -yr : yr) + (tr_bits[1] ? -yi : yi);
    p_im = (tr_bits[1] ? -yr : yr) - (tr_bits[0] ? -yi : yi);
    mag2 = DEN_W'(y.re * y.re) + DEN_W'(y.im * y.im);
  end

  logic             dv_valid;
  logic [Q_W-1:0]   recip;
  logic [TAG_W-1:0] dv_tag;
  pipe_divider #(.NUM_W(K + 1), .DEN_W(DEN_W), .Q_W(Q_W), .TAG_W(TAG_W)) u_div (
    .clk, .rst_n, .in_valid(is_ce), .num((K + 1)'(1) << K), .den(mag2),
    .tag_in({tone_idx, p_re, p_im, ce_first, avg_log}),
    .out_valid(dv_valid), .q(recip), .tag_out(dv_tag)
  );

  logic [AW-1:0]        d_tone;
  logic signed [PW-1:0] d_pre, d_pim;
  logic                 d_first;
  logic [2:0]           d_avg;
  assign {d_tone, d_pre, d_pim, d_first, d_avg} = dv_tag;

  // "routing & adders": G = X conj(Y) * recip >> (K - GF), then / 2**avg
  coef_t g_new;
  always_comb begin
    g_new.re = gsat(((64'(d_pre) * 64'(signed'({1'b0, recip}))) >>> (K - GF)) >>> d_avg);
    g_new.im = gsat(((64'(d_pim) * 64'(signed'({1'b0, recip}))) >>> (K - GF)) >>> d_avg);
  end

  // ------------------------------------------------------------ coefficients
  logic          rd_en, wr_en;
  logic [AW-1:0] rd_addr, wr_addr;
  coef_t         rd_data, wr_data;

  feq_coef_ram #(.DEPTH(NT), .AW(AW)) u_coef (
    .clk, .re(rd_en), .raddr(rd_addr), .rdata(rd_data),
    .we(wr_en), .waddr(wr_addr), .wdata(wr_data)
  );

  // Estimation stage A: read old coefficient (for averaging).
  logic          ca_v, ca_first;
  logic [AW-1:0] ca_tone;
  coef_t         ca_g;

  // Data stage 1: coefficient read; stage 2: equalize; stage 3: decide / update.
  logic               s1_v, s2_v, s1_adapt, s2_adapt;
  logic [AW-1:0]      s1_tone, s2_tone;
  logic [BITS_W-1:0]  s1_nbits, s2_nbits;
  fft_cplx_t          s1_y, s2_y;
  coef_t              s2_g;
  logic signed [XW-1:0] s2_xre, s2_xim;

  assign rd_en   = dv_valid || is_data;
  assign rd_addr = dv_valid ? d_tone : tone_idx;

  // Equalizer multiply: Xh = G * Y >> (GF - XF)
  logic signed [63:0] eq_re, eq_im;
  always_comb begin
    eq_re = (64'(rd_data.re) * 64'(s1_y.re) - 64'(rd_data.im) * 64'(s1_y.im)) >>> (GF - XF);
    eq_im = (64'(rd_data.re) * 64'(s1_y.im) + 64'(rd_data.im) * 64'(s1_y.re)) >>> (GF - XF);
  end

  // Gain / decoding table / error
  logic [DEMAP_W-1:0]   q_bits;
  logic signed [XW-1:0] q_ere, q_eim;
  qam_decision u_dec (
    .xh_re(s2_xre), .xh_im(s2_xim), .nbits(s2_nbits), .bits(q_bits),
    .dec_re(), .dec_im(), .err_re(q_ere), .err_im(q_eim)
  );

  // LMS update: G + (e conj(Y)) >> mu_shift
  coef_t g_upd;
  always_comb begin
    logic signed [63:0] u_re, u_im;
    u_re = (64'(q_ere) * 64'(s2_y.re) + 64'(q_eim) * 64'(s2_y.im)) >>> mu_shift;
    u_im = (64'(q_eim) * 64'(s2_y.re) - 64'(q_ere) * 64'(s2_y.im)) >>> mu_shift;
    g_upd.re = gsat(64'(s2_g.re) + u_re);
    g_upd.im = gsat(64'(s2_g.im) + u_im);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ca_v <= 1'b0; ca_first <= 1'b0; ca_tone <= '0; ca_g <= '0;
      s1_v <= 1'b0; s1_adapt <= 1'b0; s1_tone <= '0; s1_nbits <= '0; s1_y <= '0;
      s2_v <= 1'b0; s2_adapt <= 1'b0; s2_tone <= '0; s2_nbits <= '0; s2_y <= '0;
      s2_g <= '0; s2_xre <= '0; s2_xim <= '0;
      dec_valid <= 1'b0; dec_tone <= '0; dec_nbits <= '0; dec_bits <= '0;
      xh_re <= '0; xh_im <= '0;
    end else begin
      // estimation
      ca_v     <= dv_valid;
      ca_first <= d_first;
      ca_tone  <= d_tone;
      ca_g     <= g_new;
      // data stage 1
      s1_v     <= is_data;
      s1_adapt <= (tstate == TS_DATA) && adapt_en && (nbits != '0);
      s1_tone  <= tone_idx;
      s1_nbits <= nbits;
      s1_y     <= y;
      // data stage 2
      s2_v     <= s1_v;
      s2_adapt <= s1_adapt;
      s2_tone  <= s1_tone;
      s2_nbits <= s1_nbits;
      s2_y     <= s1_y;
      s2_g     <= rd_data;
      s2_xre   <= xsat(eq_re);
      s2_xim   <= xsat(eq_im);
      // stage 3: outputs
      dec_valid <= s2_v;
      dec_tone  <= s2_tone;
      dec_nbits <= s2_nbits;
      dec_bits  <= q_bits;
      xh_re     <= s2_xre;
      xh_im     <= s2_xim;
    end
  end

  // Coefficient write: estimation has priority over adaptation.
  always_comb begin
    wr_en   = 1'b0;
    wr_addr = ca_tone;
    wr_data = ca_g;
    if (ca_v) begin
      wr_en = 1'b1;
      if (!ca_first) begin
        wr_data.re = gsat(64'(rd_data.re) + 64'(ca_g.re));
        wr_data.im = gsat(64'(rd_data.im) + 64'(ca_g.im));
      end
    end else if (s2_v && s2_adapt) begin
      wr_en   = 1'b1;
      wr_addr = s2_tone;
      wr_data = g_upd;
    end
  end
  assign ce_wr = ca_v;

  // Estimation results and data tones must not share the coefficient port.
  a_port_free: assert property (@(posedge clk) disable iff (!rst_n)
    !(dv_valid && is_data));
endmodule
