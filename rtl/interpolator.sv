// interpolator: fractional-delay interpolator of the timing recovery loop.
//
// The ADC runs freely, so its samples are re-timed digitally. The output is
// the input delayed by 1 + mu samples (0 <= mu < 1), computed by cubic
// Lagrange interpolation over the four newest samples x0 = x(n) .. x3 =
// x(n-3), evaluated between x1 and x2 in Farrow form (Horner in mu):
//   6*y = ((C3*mu + C2)*mu + C1)*mu + 6*x1
//   C1 = -2*x0 - 3*x1 + 6*x2 - x3
//   C2 =  3*x0 - 6*x1 + 3*x2
//   C3 =   -x0 + 3*x1 - 3*x2 + x3,     mu = mu_in / 2**MU_W.
// The division by 6 is a multiply by round(2**18/6) with rounding, and the
// result is saturated to SW bits (a cubic can overshoot). Each Horner step
// truncates, so y is within one LSB of the exact cubic.
// The timing controller supplies mu; whole-sample corrections are made by the
// symbol counter / FFT window instead (see rx_control and the top). The
// design names the interpolator and points to polynomial (Farrow) timing
// interpolation; the cubic Lagrange choice and all widths are this
// implementation's.
// Timing: one sample per in_valid; y/out_valid follow one cycle later, using
// the mu present with the input sample.
module interpolator
  import vdsl_pkg::*;
#(
  parameter int unsigned SW   = SAMPLE_W,
  parameter int unsigned MU_W = 10
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [SW-1:0] x,
  input  logic [MU_W-1:0]      mu,
  output logic                 out_valid,
  output logic signed [SW-1:0] y
);
  localparam int AW = 48;                       // internal width
  localparam logic signed [AW-1:0] INV6 = AW'(43691);   // round(2**18 / 6)
  localparam logic signed [AW-1:0] YMAX = AW'((1 << (SW - 1)) - 1);
  localparam logic signed [AW-1:0] YMIN = -AW'(1 << (SW - 1));

  logic signed [SW-1:0] x1, x2, x3;
  logic signed [AW-1:0] a0, a1, a2, a3, c1, c2, c3, m, t, y6, yr;

  always_comb begin
    a0 = AW'(x);  a1 = AW'(x1);  a2 = AW'(x2);  a3 = AW'(x3);
    m  = AW'({1'b0, mu});
    c1 = -2 * a0 - 3 * a1 + 6 * a2 - a3;
    c2 =  3 * a0 - 6 * a1 + 3 * a2;
    c3 = -a0 + 3 * a1 - 3 * a2 + a3;
    t  = (c3 * m) >>> MU_W;
    t  = ((t + c2) * m) >>> MU_W;
    t  = ((t + c1) * m) >>> MU_W;
    y6 = t + 6 * a1;
    yr = (y6 * INV6 + (AW'(1) <<< 17)) >>> 18;
    if (yr > YMAX)      yr = YMAX;
    else if (yr < YMIN) yr = YMIN;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x1        <= '0;
      x2        <= '0;
      x3        <= '0;
      y         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        x1 <= x;
        x2 <= x1;
        x3 <= x2;
        y  <= SW'(yr);
      end
    end
  end
endmodule
