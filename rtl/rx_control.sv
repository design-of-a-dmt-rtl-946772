// rx_control: sequencing of the VDSL receiver.
//
// Acquisition: while searching, the boundary search runs on the correlator.
// Its sb_success gives max_age, the correlator samples since the maximum, and
// the maximum marks the last sample of a symbol body. The unit then starts a
// symbol counter sc (0 .. N+NCP-1, one count per interpolated sample) so that
// sc = 0 is the first cyclic-prefix sample of a symbol, and raises fft_enable
// for the N samples from sc = NCP-BACKOFF on: the FFT window, backed off a few
// samples into the prefix to stay clear of the previous symbol's tail. The
// first window is the first whole one after lock.
// Tracking: slips from the timing controller are counted (slip_late +1,
// slip_early -1) and applied only in the prefix, before the window starts
// (sc in [1, NCP-BACKOFF-2]), so every window keeps exactly N samples: a
// pending late slip holds sc for one sample, a pending early slip advances it
// by two, moving the window by one sample.
// Training state (per FFT output symbol, changing with stating, the first tone
// of a symbol from the FFT): TS_ACQ until the preamble end detector has seen
// the synchro symbol, then TS_CHEST for 2**avg_log symbols (ce_first on the
// first), then TS_DATA (TS_HOLD if adaptation is off). tstate and ce_first are
// valid in the cycle of stating itself, for the first tone.
// The control block, fft_enable, stating and sb_success are the design's; the
// counter alignment, the backoff and the state sequence are this
// implementation's. Timing assumption: one interpolated sample per clock
// during the search; CORR_LAT is the correlator plus search latency.
module rx_control
  import vdsl_pkg::*;
#(
  parameter int unsigned N        = N_FFT,
  parameter int unsigned NCP      = N_CP,
  parameter int unsigned BACKOFF  = N_CP / 8,
  parameter int unsigned CORR_LAT = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         restart,
  input  logic         samp_valid,
  input  logic         sb_success,
  input  logic [$clog2(N+NCP)-1:0] max_age,
  input  logic         slip_late,
  input  logic         slip_early,
  input  logic         stating,
  input  logic         preamble_end,
  input  logic [2:0]   avg_log,
  input  logic         adapt_en,
  output logic         search_en,
  output logic         locked,
  output logic         fft_enable,
  output train_state_e tstate,
  output logic         ce_first,
  output logic         ce_init
);
  localparam int unsigned SYM = N + NCP;
  localparam int unsigned SW  = $clog2(SYM);
  localparam int unsigned W_START = NCP - BACKOFF;

  logic [SW-1:0] sc;
  logic          win_ok;   // a whole symbol has started since lock
  logic signed [4:0] pend; // slips waiting for the prefix
  logic          in_gap, do_late, do_early;
  logic signed [5:0] pend_nx;
  logic          pend_chest;
  train_state_e  ts_r, ts_new;
  logic [7:0]    ce_cnt;

  assign search_en  = !locked;
  assign fft_enable = locked && win_ok && samp_valid &&
                      (sc >= SW'(W_START)) && (sc < SW'(W_START + N));

  assign in_gap   = (sc >= SW'(1)) && (sc + SW'(2) <= SW'(W_START));
  assign do_late  = samp_valid && in_gap && (pend > 0);
  assign do_early = samp_valid && in_gap && (pend < 0);
  // requested minus applied slips, saturated to +-15
  always_comb begin
    pend_nx = 6'(pend) + 6'(slip_late) - 6'(slip_early) - 6'(do_late) + 6'(do_early);
    if (pend_nx > 6'sd15)  pend_nx = 6'sd15;
    if (pend_nx < -6'sd15) pend_nx = -6'sd15;
  end

  function automatic logic [SW-1:0] wrap(input int unsigned v);
    return SW'(v % SYM);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked <= 1'b0;
      win_ok <= 1'b0;
      pend   <= '0;
      sc     <= '0;
    end else if (restart) begin
      locked <= 1'b0;
      win_ok <= 1'b0;
      pend   <= '0;
    end else if (!locked) begin
      win_ok <= 1'b0;
      pend   <= '0;
      if (sb_success) begin
        locked <= 1'b1;
        // sample of this cycle is (max_age + CORR_LAT) after the body's last
        // sample (sc = SYM-1); the next one follows it.
        sc <= wrap(int'(max_age) + CORR_LAT);
      end
    end else begin
      pend <= 5'(pend_nx);
      if (samp_valid) begin
        if (sc == '0) win_ok <= 1'b1;
        if (do_late)       sc <= sc;
        else if (do_early) sc <= wrap(int'(sc) + 2);
        else               sc <= wrap(int'(sc) + 1);
      end
    end
  end

  // Training-state sequence, advanced at symbol starts of the FFT output.
  always_comb begin
    ts_new = ts_r;
    unique case (ts_r)
      TS_ACQ:   if (pend_chest) ts_new = TS_CHEST;
      TS_CHEST: if (ce_cnt >= (8'd1 << avg_log)) ts_new = adapt_en ? TS_DATA : TS_HOLD;
      default:  ts_new = adapt_en ? TS_DATA : TS_HOLD;
    endcase
  end

  assign tstate   = stating ? ts_new : ts_r;
  assign ce_first = (tstate == TS_CHEST) && (stating ? (ts_r == TS_ACQ) : (ce_cnt == 8'd1));
  assign ce_init  = preamble_end && (ts_r == TS_ACQ);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ts_r       <= TS_ACQ;
      pend_chest <= 1'b0;
      ce_cnt     <= '0;
    end else if (restart || !locked) begin
      ts_r       <= TS_ACQ;
      pend_chest <= 1'b0;
      ce_cnt     <= '0;
    end else begin
      if (ce_init) pend_chest <= 1'b1;
      if (stating) begin
        ts_r <= ts_new;
        if (ts_new == TS_CHEST) ce_cnt <= ce_cnt + 1'b1;
        if (ts_new == TS_CHEST && ts_r == TS_ACQ) pend_chest <= 1'b0;
      end
    end
  end
endmodule
