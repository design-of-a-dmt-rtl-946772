// preamble_end_detector: finds the O-P-SYNCHRO symbol that ends the preamble.
//
// The O-P-TRAINING symbols repeat one pattern, and the O-P-SYNCHRO symbol that
// follows marks the start of channel estimation. This block watches one tone
// (the primary pilot) of the FFT output and compares it with the same tone of
// the previous symbol: Re{X[n] conj(X[n-1])} < 0, a phase reversal, pulses
// preamble_end. Taking the synchro symbol to be the training pattern with every
// tone inverted is this implementation's assumption; the design only names the
// detector. Timing: preamble_end pulses one cycle after the watched tone.
module preamble_end_detector
  import vdsl_pkg::*;
#(
  parameter int unsigned TONE = PILOT_PRIMARY
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,
  input  logic              tone_valid,
  input  logic [TONE_W-1:0] tone_idx,
  input  fft_cplx_t         tone,
  output logic              preamble_end
);
  fft_cplx_t prev;
  logic      prev_valid;
  logic signed [2*FFT_W:0] dot;

  assign dot = (2*FFT_W+1)'(tone.re * prev.re) + (2*FFT_W+1)'(tone.im * prev.im);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev         <= '0;
      prev_valid   <= 1'b0;
      preamble_end <= 1'b0;
    end else begin
      preamble_end <= 1'b0;
      if (!enable) begin
        prev_valid <= 1'b0;
      end else if (tone_valid && tone_idx == TONE_W'(TONE)) begin
        prev       <= tone;
        prev_valid <= 1'b1;
        if (prev_valid && dot < 0) preamble_end <= 1'b1;
      end
    end
  end
endmodule
