// timing_error_detector: sampling-clock timing error from two pilot tones.
//
// A sampling offset tau rotates tone k by 2*pi*k*tau/N, so the phase difference
// between two pilots changes from symbol to symbol in proportion to the drift
// of tau. Per symbol the block captures the FFT outputs of the primary pilot k
// (tone 600) and of the secondary pilot l (a scan-chain parameter), measures
// both angles and outputs
//   e(n) = (ang X[n,k] - ang X[n,l]) - (ang X[n-1,k] - ang X[n-1,l]).
// An angle is measured with the I/Q divider (ratio min(|I|,|Q|)/max(|I|,|Q|)),
// the arctangent ROM (first octant) and an octant fold. Phases are in units of
// 2*pi/2**PHASE_W and wrap naturally, so e is the wrapped difference in
// [-pi, pi). The error formula and the divider/ROM structure follow the design;
// number formats and sequencing are this implementation's.
// Timing: after both pilots of a symbol are captured, about 2*(FRAC+4) cycles
// later e_valid pulses (not for the first symbol after clear).
// The divider's busy output is left unused: the sequencer waits for done.
module timing_error_detector
  import vdsl_pkg::*;
#(
  parameter int unsigned PILOT_K = PILOT_PRIMARY,
  parameter int unsigned FRAC    = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic                    tone_valid,
  input  logic [TONE_W-1:0]       tone_idx,
  input  fft_cplx_t               tone,
  input  logic [TONE_W-1:0]       pilot_l,
  output logic                    e_valid,
  output logic signed [PHASE_W-1:0] e,
  output logic [PHASE_W-1:0]      phase_k,   // last measured angles
  output logic [PHASE_W-1:0]      phase_l
);
  typedef enum logic [2:0] {S_IDLE, S_START, S_WAIT, S_ANGLE, S_OUT} state_e;
  state_e state;

  fft_cplx_t          xk, xl, cur;
  logic               have_k, have_l, sel, prev_valid;
  logic [PHASE_W-1:0] diff_prev, ang_k;

  // |I|, |Q| of the pilot being measured
  logic [FFT_W-1:0] abs_i, abs_q, mn, mx;
  logic             swap;
  always_comb begin
    abs_i   = cur.re[FFT_W-1] ? FFT_W'(-cur.re) : FFT_W'(cur.re);
    abs_q   = cur.im[FFT_W-1] ? FFT_W'(-cur.im) : FFT_W'(cur.im);
    swap = abs_q > abs_i;
    mn   = swap ? abs_i : abs_q;
    mx   = swap ? abs_q : abs_i;
  end

  logic          div_start, div_busy, div_done;
  logic [FRAC:0] ratio;
  seq_divider #(.W(FFT_W), .FRAC(FRAC)) u_div (
    .clk, .rst_n, .start(div_start), .num(mn), .den(mx),
    .busy(div_busy), .done(div_done), .q(ratio)
  );

  logic [9:0] oct_ang;
  atan_rom #(.AW(FRAC+1), .DW(10)) u_atan (.addr(ratio), .data(oct_ang));

  // Fold the first-octant angle into the full circle.
  localparam logic [PHASE_W-1:0] QUARTER = PHASE_W'(1 << (PHASE_W-2));
  localparam logic [PHASE_W-1:0] HALF    = PHASE_W'(1 << (PHASE_W-1));
  logic [PHASE_W-1:0] a1, ang;
  always_comb begin
    a1 = (mx == '0) ? '0 : PHASE_W'(oct_ang);
    if (swap) a1 = QUARTER - a1;
    unique case ({cur.re[FFT_W-1], cur.im[FFT_W-1]})
      2'b00:   ang = a1;
      2'b10:   ang = HALF - a1;
      2'b11:   ang = HALF + a1;
      default: ang = -a1;
    endcase
  end

  assign div_start = (state == S_START);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      xk         <= '0;
      xl         <= '0;
      cur        <= '0;
      have_k     <= 1'b0;
      have_l     <= 1'b0;
      sel        <= 1'b0;
      prev_valid <= 1'b0;
      diff_prev  <= '0;
      ang_k      <= '0;
      e_valid    <= 1'b0;
      e          <= '0;
      phase_k    <= '0;
      phase_l    <= '0;
    end else begin
      e_valid <= 1'b0;
      if (clear) begin
        state      <= S_IDLE;
        have_k     <= 1'b0;
        have_l     <= 1'b0;
        prev_valid <= 1'b0;
      end else begin
        if (tone_valid && tone_idx == TONE_W'(PILOT_K)) begin
          xk     <= tone;
          have_k <= 1'b1;
        end
        if (tone_valid && tone_idx == pilot_l) begin
          xl     <= tone;
          have_l <= 1'b1;
        end
        unique case (state)
          S_IDLE: if (have_k && have_l) begin
            have_k <= 1'b0;
            have_l <= 1'b0;
            cur    <= xk;
            sel    <= 1'b0;
            state  <= S_START;
          end
          S_START: state <= S_WAIT;
          S_WAIT:  if (div_done) state <= S_ANGLE;
          S_ANGLE: begin
            if (!sel) begin
              ang_k <= ang;
              cur   <= xl;
              sel   <= 1'b1;
              state <= S_START;
            end else begin
              phase_k   <= ang_k;
              phase_l   <= ang;
              diff_prev <= ang_k - ang;
              if (prev_valid) begin
                e       <= $signed((ang_k - ang) - diff_prev);
                e_valid <= 1'b1;
              end
              prev_valid <= 1'b1;
              state      <= S_OUT;
            end
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end
endmodule
