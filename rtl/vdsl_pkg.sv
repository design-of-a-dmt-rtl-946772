// vdsl_pkg: types and constants shared by the VDSL DMT baseband receiver.
//
// The receiver works on a real baseband signal sampled by a 12-bit ADC. One DMT
// symbol is an N_FFT-point body (8192 samples, giving 4096 tones) preceded by an
// N_CP-sample cyclic prefix (640 samples), the largest VDSL configuration. The
// external FFT returns one complex tone per clock with 15-bit components.
// Pilot tone 600 is the primary timing pilot. These numbers follow the VDSL
// parameters of the design; the fixed-point formats below are this design's own.
package vdsl_pkg;

  localparam int unsigned SAMPLE_W = 12;   // ADC / interpolator sample width
  localparam int unsigned FFT_W    = 15;   // FFT output component width
  localparam int unsigned N_FFT    = 8192; // FFT size (4096 tones)
  localparam int unsigned N_CP     = 640;  // cyclic prefix length
  localparam int unsigned N_TONES  = 4096; // tones per symbol
  localparam int unsigned TONE_W   = 12;   // tone index width (Counter, 12 bits)
  localparam int unsigned PILOT_PRIMARY = 600;
  localparam int unsigned BITS_W   = 4;    // bit allocation entry (0..15 bits)
  localparam int unsigned DEMAP_W  = 15;   // demapper output bits per tone

  // Phase in units of 2*pi / 2**PHASE_W; differences wrap naturally.
  localparam int unsigned PHASE_W  = 12;

  // Equalized-tone format: normalized constellation, XF fraction bits.
  localparam int unsigned XF = 12;
  localparam int unsigned XW = 18;
  // FEQ coefficient format: each component GW bits, value = G * 2**GF.
  localparam int unsigned GW = 24;
  localparam int unsigned GF = 30;

  // Training state carried to the channel estimation block (2 bits).
  typedef enum logic [1:0] {
    TS_ACQ   = 2'd0,  // O-P-TRAINING: acquisition, no channel estimation
    TS_CHEST = 2'd1,  // O-P-MEDLEY: channel estimation and averaging
    TS_DATA  = 2'd2,  // normal data: decision and LMS adaptation
    TS_HOLD  = 2'd3   // normal data, FEQ adaptation frozen
  } train_state_e;

  typedef struct packed {
    logic signed [FFT_W-1:0] re;
    logic signed [FFT_W-1:0] im;
  } fft_cplx_t;

  typedef struct packed {
    logic signed [GW-1:0] re;
    logic signed [GW-1:0] im;
  } coef_t;

  // Receiver parameters held in the scan chain.
  typedef struct packed {
    logic [35:0]        sb_threshold;   // symbol detection threshold on CS(i)
    logic [TONE_W-1:0]  pilot_second;   // secondary pilot tone index
    logic signed [7:0]  lf_kp;          // loop filter proportional gain
    logic signed [7:0]  lf_ki;          // loop filter integral gain
    logic [4:0]         mu_shift;       // LMS step size, mu = 2**-(mu_shift+18)
    logic [2:0]         ch_avg_log;     // log2 of channel-estimate averages
    logic               adapt_en;       // FEQ adaptation enable
  } rx_params_t;

  localparam int unsigned PARAMS_W = $bits(rx_params_t);

  // Reset values of the scan chain. The loop gains (integral only, -2) and
  // the LMS step were chosen by end-to-end simulation at a 100 ppm clock
  // offset; the threshold must be set for the actual signal level.
  localparam rx_params_t PARAMS_DEFAULT = '{
    sb_threshold: 36'd4000000,
    pilot_second: TONE_W'(1200),
    lf_kp:        8'sd0,
    lf_ki:        -8'sd2,
    mu_shift:     5'd9,
    ch_avg_log:   3'd1,
    adapt_en:     1'b1
  };

  // Integer square root, used to build constant gain tables.
  function automatic longint unsigned isqrt(input longint unsigned v);
    longint unsigned r;
    r = 0;
    for (int b = 31; b >= 0; b--) begin
      longint unsigned t;
      t = r | (64'd1 << b);
      if (t * t <= v) r = t;
    end
    return r;
  endfunction

  // Bits carried on the in-phase and quadrature axes for b bits per tone
  // (rectangular QAM: ceil(b/2) on I, floor(b/2) on Q).
  function automatic int unsigned bits_i(input int unsigned b);
    return (b + 1) / 2;
  endfunction
  function automatic int unsigned bits_q(input int unsigned b);
    return b / 2;
  endfunction

endpackage
