// tb_preamble_end_detector: several symbols with a fixed point on the
// watched tone and random points elsewhere, then one with that tone
// inverted: preamble_end must pulse once, in the cycle after the inverted
// tone, and never while disabled.
module tb_preamble_end_detector;
  import vdsl_pkg::*;
  localparam int TONE = 10;
  logic clk = 0, rst_n = 0, enable = 0, tone_valid = 0, preamble_end;
  logic [TONE_W-1:0] tone_idx = '0;
  fft_cplx_t tone = '0;
  int checks = 0, failures = 0;

  preamble_end_detector #(.TONE(TONE)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pulses;
    repeat (3) @(posedge clk);
    rst_n = 1;
    pulses = 0;
    for (int s = 0; s < 9; s++) begin
      enable = (s != 0);
      for (int k = 0; k < 20; k++) begin
        bit inv, exp;
        @(negedge clk);
        tone_valid = 1; tone_idx = TONE_W'(k);
        inv = (s == 0 && k == TONE) || (s == 5 && k == TONE);
        if (k == TONE) begin
          tone.re = inv ? -15'sd3000 : 15'sd3000;
          tone.im = inv ? 15'sd1200 : -15'sd1200;
        end else begin
          tone.re = FFT_W'($urandom); tone.im = FFT_W'($urandom);
        end
        exp = (s == 5 && k == TONE) || (s == 6 && k == TONE);
        @(posedge clk); #1;
        checks++;
        if (preamble_end != exp) begin failures++; $display("sym %0d tone %0d pe=%0b", s, k, preamble_end); end
        pulses += int'(preamble_end);
      end
    end
    checks++;
    if (pulses != 2) begin failures++; $display("pulses %0d", pulses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
