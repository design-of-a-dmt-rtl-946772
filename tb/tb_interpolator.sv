// tb_interpolator: random samples and fractional delays. Each output must be
// within one LSB of the cubic Lagrange polynomial through the four newest
// samples, evaluated (in floating point) at a delay of 1 + mu, saturated to
// the sample range, one cycle after its input. Random inputs make the
// polynomial overshoot often, so saturation is exercised too. A second part
// feeds a slow sine and checks that the output follows the sine delayed by
// 1 + mu to within a few LSB (the interpolation is accurate in band), and
// that mu = 0 gives exactly x(n-1).
module tb_interpolator;
  localparam int SW = 12, MU_W = 10;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [SW-1:0] x = '0, y;
  logic [MU_W-1:0] mu = '0;
  int checks = 0, failures = 0;

  interpolator #(.SW(SW), .MU_W(MU_W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real cubic(real x0, real x1, real x2, real x3, real u);
    real c1, c2, c3;
    c1 = -x0 / 3.0 - x1 / 2.0 + x2 - x3 / 6.0;
    c2 = x0 / 2.0 - x1 + x2 / 2.0;
    c3 = -x0 / 6.0 + x1 / 2.0 - x2 / 2.0 + x3 / 6.0;
    return ((c3 * u + c2) * u + c1) * u + x1;
  endfunction

  initial begin
    int h [4];
    int m, sat;
    real e, d;
    repeat (3) @(posedge clk);
    rst_n = 1;
    h = '{0, 0, 0, 0};
    // part 1: random samples against the polynomial
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      in_valid = 1;
      x  = SW'($signed($urandom_range(0, 4095)) - 2048);
      mu = (i % 10 == 0) ? '0 : MU_W'($urandom);
      h[3] = h[2]; h[2] = h[1]; h[1] = h[0]; h[0] = int'(x);
      m = int'(mu);
      e = cubic(h[0], h[1], h[2], h[3], real'(m) / real'(1 << MU_W));
      if (e > 2047.0) e = 2047.0;
      if (e < -2048.0) e = -2048.0;
      @(posedge clk); #1;
      if (i >= 3) begin
        d = real'(y) - e;
        checks++;
        if (!out_valid || d > 1.0 || d < -1.0 || (m == 0 && int'(y) != h[1])) begin
          failures++;
          $display("i=%0d mu=%0d y=%0d exp=%f", i, m, y, e);
        end
      end
    end
    // part 2: a sine at 0.05 cycles per sample, 1500 LSB amplitude
    sat = 0;
    for (int n = 0; n < 400; n++) begin
      real u;
      @(negedge clk);
      x  = SW'(int'(1500.0 * $sin(2.0 * PI * 0.05 * n)));
      mu = MU_W'($urandom);
      u  = real'(mu) / real'(1 << MU_W);
      e  = 1500.0 * $sin(2.0 * PI * 0.05 * (n - 1.0 - u));
      @(posedge clk); #1;
      if (n >= 3) begin
        d = real'(y) - e;
        checks++;
        if (d > 4.0 || d < -4.0) begin
          failures++;
          $display("sine n=%0d y=%0d exp=%f", n, y, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
