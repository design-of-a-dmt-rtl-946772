// tone_counter: tone index of the FFT output stream (the 12-bit Counter).
//
// The FFT delivers the tones of a symbol in order, one per tone_valid, and
// marks the first with stating. The counter restarts at 0 on stating and
// counts up on every further valid tone; its value addresses the bit
// allocation table and the FEQ coefficient registers. Combinational output:
// idx is the index of the tone presented in the same cycle.
module tone_counter
  import vdsl_pkg::*;
#(
  parameter int unsigned W = TONE_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         tone_valid,
  input  logic         stating,
  output logic [W-1:0] idx
);
  logic [W-1:0] cnt;

  assign idx = stating ? '0 : cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else if (tone_valid) cnt <= idx + 1'b1;
  end
endmodule
