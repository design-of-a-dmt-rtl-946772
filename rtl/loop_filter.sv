// loop_filter: proportional-integral filter of the timing recovery loop.
//
// Once per DMT symbol the timing error detector delivers a phase error e.
// The filter keeps an integrator  I += ki*e  and outputs the frequency word
//   freq = kp*e + I   (saturated to FW bits)
// that the timing controller adds to its delay accumulator on every sample.
// The gains are signed and loaded through the parameter scan chain, so the
// loop sign and bandwidth are set there. The design shows a filter of adders,
// multipliers and registers whose parameters must be tuned; the PI form is
// this implementation's reading of it.
// Timing: freq is updated in the cycle after e_valid and held until the next.
module loop_filter #(
  parameter int unsigned EW = 13,
  parameter int unsigned FW = 24,
  parameter int unsigned IW = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 e_valid,
  input  logic signed [EW-1:0] e,
  input  logic signed [7:0]    kp,
  input  logic signed [7:0]    ki,
  output logic signed [FW-1:0] freq
);
  logic signed [IW-1:0] integ, integ_next;
  logic signed [IW+1:0] total;

  localparam logic signed [IW+1:0] FMAX = (IW+2)'((64'sd1 <<< (FW-1)) - 1);
  localparam logic signed [IW+1:0] FMIN = -(IW+2)'(64'sd1 <<< (FW-1));

  always_comb begin
    integ_next = integ + IW'(ki * e);
    total      = (IW+2)'(integ_next) + (IW+2)'(kp * e);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      integ <= '0;
      freq  <= '0;
    end else if (clear) begin
      integ <= '0;
      freq  <= '0;
    end else if (e_valid) begin
      integ <= integ_next;
      if (total > FMAX)      freq <= FMAX[FW-1:0];
      else if (total < FMIN) freq <= FMIN[FW-1:0];
      else                   freq <= total[FW-1:0];
    end
  end
endmodule
