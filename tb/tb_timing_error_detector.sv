// tb_timing_error_detector: symbols whose two pilots carry random angles and
// amplitudes in all four quadrants. e must equal the wrapped change of the
// pilot phase difference, (ak - al) - (ak' - al'), in units of 2*pi/4096,
// within the table resolution; the first symbol after clear gives none.
module tb_timing_error_detector;
  import vdsl_pkg::*;
  localparam int PK = 3, PL = 7, NT = 10, TOL = 12;
  logic clk = 0, rst_n = 0, clear = 0, tone_valid = 0, e_valid;
  logic [TONE_W-1:0] tone_idx = '0, pilot_l = TONE_W'(PL);
  fft_cplx_t tone = '0;
  logic signed [PHASE_W-1:0] e;
  logic [PHASE_W-1:0] phase_k, phase_l;
  int checks = 0, failures = 0, n_e = 0;

  timing_error_detector #(.PILOT_K(PK)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real PI = 3.14159265358979;
  real dprev, dcur;
  bit  have_prev = 0;

  function automatic int wrapd(real d);   // radians -> units in [-2048, 2048)
    int u;
    u = int'($floor(d * 4096.0 / (2.0 * PI) + 0.5));
    u = ((u % 4096) + 4096) % 4096;
    return (u >= 2048) ? u - 4096 : u;
  endfunction

  always @(posedge clk) begin
    #1;
    if (e_valid) begin
      int exp, diff;
      n_e++;
      exp = wrapd(dcur - dprev);
      diff = int'(e) - exp;
      if (diff > 2048) diff -= 4096;
      if (diff < -2048) diff += 4096;
      checks++;
      if (!have_prev || diff > TOL || diff < -TOL) begin
        failures++;
        $display("e=%0d exp=%0d", e, exp);
      end
    end
  end

  initial begin
    real ak, al, amp_k, amp_l;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 40; s++) begin
      ak = $urandom_range(0, 3599) * 2.0 * PI / 3600.0;
      al = $urandom_range(0, 3599) * 2.0 * PI / 3600.0;
      amp_k = $urandom_range(500, 15000);
      amp_l = $urandom_range(500, 15000);
      if (s == 20) begin
        @(negedge clk) clear = 1;
        @(negedge clk) clear = 0;
        have_prev = 0;
      end
      for (int k = 0; k < NT; k++) begin
        @(negedge clk);
        tone_valid = 1; tone_idx = TONE_W'(k);
        if (k == PK) begin
          tone.re = FFT_W'(int'(amp_k * $cos(ak))); tone.im = FFT_W'(int'(amp_k * $sin(ak)));
        end else if (k == PL) begin
          tone.re = FFT_W'(int'(amp_l * $cos(al))); tone.im = FFT_W'(int'(amp_l * $sin(al)));
        end else begin
          tone.re = FFT_W'($urandom); tone.im = FFT_W'($urandom);
        end
      end
      @(negedge clk) tone_valid = 0;
      if (s != 0 && s != 20) have_prev = 1;
      dprev = dcur;
      dcur = ak - al;
      repeat (40) @(negedge clk);
    end
    checks++;
    if (n_e != 38) begin failures++; $display("e count %0d", n_e); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
