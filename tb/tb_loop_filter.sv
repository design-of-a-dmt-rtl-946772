// tb_loop_filter: random error samples and gains; the output must follow
// freq = kp*e + I with I += ki*e, saturated to FW bits, and hold between
// updates; clear must zero both.
module tb_loop_filter;
  localparam int EW = 12, FW = 16, IW = 24;
  logic clk = 0, rst_n = 0, clear = 0, e_valid = 0;
  logic signed [EW-1:0] e = '0;
  logic signed [7:0] kp = 8'sd16, ki = 8'sd3;
  logic signed [FW-1:0] freq;
  int checks = 0, failures = 0, n_sat = 0;

  loop_filter #(.EW(EW), .FW(FW), .IW(IW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint integ, tot, exp;
    repeat (3) @(posedge clk);
    rst_n = 1;
    integ = 0; exp = 0;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      clear = (i == 300);
      e_valid = ($urandom_range(0, 2) == 0);
      e = EW'($signed($urandom_range(0, 400)) - 200);
      if (i == 200) begin kp = -8'sd100; ki = 8'sd100; end
      if (i == 301) begin kp = 8'sd7; ki = -8'sd2; end
      if (clear) begin
        integ = 0; exp = 0;
      end else if (e_valid) begin
        integ += longint'(ki) * longint'(e);
        integ = longint'(IW'(integ));   // wrap like the hardware
        if (integ >= (64'sd1 <<< (IW-1))) integ -= (64'sd1 <<< IW);
        tot = integ + longint'(kp) * longint'(e);
        if (tot > 32767) begin exp = 32767; n_sat++; end
        else if (tot < -32768) begin exp = -32768; n_sat++; end
        else exp = tot;
      end
      @(posedge clk); #1;
      checks++;
      if (longint'(freq) != exp) begin
        failures++;
        $display("i=%0d freq=%0d exp=%0d", i, freq, exp);
      end
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
