// vdsl_rx_top: DMT baseband receiver for VDSL (the receiver chip).
//
// Time domain: 12-bit ADC samples pass the interpolator of the timing recovery
// loop. The delay correlator and boundary search find the symbol boundary from
// the cyclic prefix; the control unit then marks the FFT window (fft_enable)
// of each symbol in the interpolated stream fft_in, which leaves the chip for
// the external FFT. Frequency domain: the FFT returns one complex 15-bit tone
// per clock (fft_out_valid), the first of each symbol flagged by stating.
// The tone counter indexes the tones; the pilot tones feed the preamble end
// detector and the timing error detector, whose error goes through the loop
// filter to the timing controller and back to the interpolator. All tones go
// to channel estimation / FEQ / decision, which with the bit allocation table
// produces the demapped bits (dec_bits, dec_nbits valid bits) of each tone.
// Parameters come from a scan chain (scan, scan_in, scan_out).
// Outside this module, as in the design: ADC, FFT, and the back end (bit
// reverse reshuffling, deinterleaver, Reed-Solomon decoder, descrambler).
// The block partition follows the design; interfaces between the blocks are
// this implementation's. Assumes one ADC sample per clock while searching.
// Timing slips: a late slip drops one interpolated sample from the symbol
// counter and FFT window; an early slip is applied by the control unit as a
// window move inside the cyclic prefix (both this implementation's choice).
// The search unit's 'detected' (above threshold) and the detector's pilot
// phases are status signals that are left unused here.
module vdsl_rx_top
  import vdsl_pkg::*;
#(
  parameter int unsigned N       = N_FFT,
  parameter int unsigned NCP     = N_CP,
  parameter int unsigned PILOT_K = PILOT_PRIMARY
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   restart,
  // ADC
  input  logic                   adc_valid,
  input  logic signed [SAMPLE_W-1:0] adc_data,
  // to the FFT
  output logic                   fft_enable,
  output logic signed [SAMPLE_W-1:0] fft_in,
  // from the FFT
  input  logic                   fft_out_valid,
  input  logic                   stating,
  input  fft_cplx_t              fft_out,
  // bit allocation table load
  input  logic                   bat_we,
  input  logic [TONE_W-1:0]      bat_addr,
  input  logic [BITS_W-1:0]      bat_data,
  // parameter scan chain
  input  logic                   scan,
  input  logic                   scan_in,
  output logic                   scan_out,
  // QAM demapper output
  output logic                   dec_valid,
  output logic [TONE_W-1:0]      dec_tone,
  output logic [BITS_W-1:0]      dec_nbits,
  output logic [DEMAP_W-1:0]     dec_bits,
  output logic signed [XW-1:0]   dec_xh_re,
  output logic signed [XW-1:0]   dec_xh_im,
  // status
  output logic                   locked,
  output train_state_e           tstate,
  output logic                   sb_success,
  output logic                   preamble_end,
  output logic                   ce_wr,
  output logic                   ted_valid,
  output logic signed [PHASE_W-1:0] ted_err,
  output logic signed [23:0]     timing_freq,
  output logic                   slip_late,
  output logic                   slip_early
);
  localparam int unsigned SYM  = N + NCP;
  localparam int unsigned CW   = 2 * SAMPLE_W + $clog2(NCP) + 1;
  localparam int unsigned MU_W = 10;

  rx_params_t params;
  param_scan_chain u_scan (.clk, .rst_n, .scan, .scan_in, .scan_out, .params);

  // ---------------------------------------------------------- time domain
  logic [MU_W-1:0] mu;
  logic            iv;
  logic signed [SAMPLE_W-1:0] iy;

  interpolator #(.SW(SAMPLE_W), .MU_W(MU_W)) u_interp (
    .clk, .rst_n, .in_valid(adc_valid), .x(adc_data), .mu,
    .out_valid(iv), .y(iy)
  );
  assign fft_in = iy;

  // When the delay wraps up by one sample (slip_late) the next interpolator
  // output repeats the previous sample's content; it is dropped from the
  // symbol counter and the FFT window, keeping the window content continuous.
  // Early slips (a sample missing) cannot be filled at one sample per clock
  // and are applied by the control unit as a window move in the prefix.
  logic drop, sv;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) drop <= 1'b0;
    else        drop <= slip_late;
  assign sv = iv && !drop;

  logic                 cs_valid;
  logic signed [CW-1:0] cs;
  delay_correlator #(.N(N), .NG(NCP), .SW(SAMPLE_W)) u_corr (
    .clk, .rst_n, .in_valid(iv), .r(iy), .cs_valid, .cs
  );

  logic                    search_en, detected;
  logic [$clog2(SYM)-1:0]  max_age;
  search_boundary #(.CW(CW), .TW(36), .SYM(SYM)) u_search (
    .clk, .rst_n, .enable(search_en), .cs_valid, .cs,
    .threshold(params.sb_threshold), .detected, .sb_success, .max_age
  );

  logic ce_first, ce_init;
  rx_control #(.N(N), .NCP(NCP)) u_ctrl (
    .clk, .rst_n, .restart, .samp_valid(sv), .sb_success, .max_age,
    .slip_late(1'b0), .slip_early, .stating, .preamble_end,
    .avg_log(params.ch_avg_log), .adapt_en(params.adapt_en),
    .search_en, .locked, .fft_enable, .tstate, .ce_first, .ce_init
  );

  // ---------------------------------------------------------- frequency domain
  logic [TONE_W-1:0] tone_idx;
  tone_counter #(.W(TONE_W)) u_cnt (
    .clk, .rst_n, .tone_valid(fft_out_valid), .stating, .idx(tone_idx)
  );

  logic [BITS_W-1:0] nbits;
  bit_alloc_table #(.DEPTH(N / 2), .AW(TONE_W)) u_bat (
    .clk, .we(bat_we), .waddr(bat_addr), .wdata(bat_data),
    .raddr(tone_idx), .rdata(nbits)
  );

  preamble_end_detector #(.TONE(PILOT_K)) u_ped (
    .clk, .rst_n, .enable(locked), .tone_valid(fft_out_valid),
    .tone_idx, .tone(fft_out), .preamble_end
  );

  timing_error_detector #(.PILOT_K(PILOT_K)) u_ted (
    .clk, .rst_n, .clear(!locked), .tone_valid(fft_out_valid), .tone_idx,
    .tone(fft_out), .pilot_l(params.pilot_second),
    .e_valid(ted_valid), .e(ted_err), .phase_k(), .phase_l()
  );

  loop_filter #(.EW(PHASE_W), .FW(24)) u_lf (
    .clk, .rst_n, .clear(!locked), .e_valid(ted_valid), .e(ted_err),
    .kp(params.lf_kp), .ki(params.lf_ki), .freq(timing_freq)
  );

  timing_controller #(.FRAC_W(24), .FW(24), .MU_W(MU_W)) u_tc (
    .clk, .rst_n, .step(iv && locked), .freq(timing_freq), .mu,
    .slip_late, .slip_early
  );

  chest_feq #(.NT(N / 2), .AW(TONE_W)) u_feq (
    .clk, .rst_n, .tstate, .ce_first, .ce_init,
    .avg_log(params.ch_avg_log), .mu_shift(params.mu_shift),
    .adapt_en(params.adapt_en), .tone_valid(fft_out_valid), .tone_idx,
    .y(fft_out), .nbits, .dec_valid, .dec_tone, .dec_nbits, .dec_bits,
    .xh_re(dec_xh_re), .xh_im(dec_xh_im), .ce_wr
  );
endmodule
