// timing_controller: numerically controlled delay for the interpolator.
//
// A fractional-delay accumulator (FRAC_W bits, one unit = 2**-FRAC_W sample)
// adds the loop filter's frequency word once per interpolated sample. Its top
// MU_W bits are the interpolator's mu. When the accumulated delay leaves
// [0, 1) the accumulator wraps by one sample and a slip is reported. If it
// fell below zero, mu jumps up by one sample, the interpolated stream arrives
// one sample later and the FFT window must follow it: slip_late. If it passed
// one, mu drops by one sample and the window must move one sample earlier:
// slip_early. The design names the
// timing controller as part of the digital timing recovery loop; the
// accumulator-and-slip form is this implementation's choice.
// Timing: mu and the slip flags change in the cycle after a step.
module timing_controller #(
  parameter int unsigned FRAC_W = 24,
  parameter int unsigned FW     = 24,
  parameter int unsigned MU_W   = 10
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 step,       // one interpolated sample
  input  logic signed [FW-1:0] freq,       // delay change per sample
  output logic [MU_W-1:0]      mu,
  output logic                 slip_late,
  output logic                 slip_early
);
  logic [FRAC_W-1:0]     acc;
  logic signed [FRAC_W+1:0] sum;

  assign sum = $signed({2'b00, acc}) + (FRAC_W+2)'(freq);
  assign mu  = acc[FRAC_W-1 -: MU_W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc        <= '0;
      slip_late  <= 1'b0;
      slip_early <= 1'b0;
    end else begin
      slip_late  <= 1'b0;
      slip_early <= 1'b0;
      if (step) begin
        acc <= sum[FRAC_W-1:0];   // modulo one sample
        if (sum[FRAC_W+1])       slip_late  <= 1'b1;  // delay wrapped up by one
        else if (sum[FRAC_W])    slip_early <= 1'b1;  // delay wrapped down by one
      end
    end
  end
endmodule
