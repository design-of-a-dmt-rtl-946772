// tb_timing_controller: steps the delay accumulator with positive, negative
// and random frequency words and checks mu and the slip flags against a
// model accumulator, including the number of slips in each direction.
module tb_timing_controller;
  localparam int FRAC_W = 16, FW = 16, MU_W = 6;
  logic clk = 0, rst_n = 0, step = 0;
  logic signed [FW-1:0] freq = '0;
  logic [MU_W-1:0] mu;
  logic slip_late, slip_early;
  int checks = 0, failures = 0, n_late = 0, n_early = 0;

  timing_controller #(.FRAC_W(FRAC_W), .FW(FW), .MU_W(MU_W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint acc, s;
    bit el, ee;
    repeat (3) @(posedge clk);
    rst_n = 1;
    acc = 0;
    for (int i = 0; i < 900; i++) begin
      @(negedge clk);
      step = ($urandom_range(0, 4) != 0);
      if (i < 300)      freq = 16'sd3001;
      else if (i < 600) freq = -16'sd2500;
      else              freq = FW'($signed($urandom_range(0, 20000)) - 10000);
      el = 0; ee = 0;
      if (step) begin
        s = acc + longint'(freq);
        // wrap down by one sample: window earlier; wrap up: window later
        if (s >= (1 << FRAC_W)) begin ee = 1; s -= (1 << FRAC_W); end
        else if (s < 0) begin el = 1; s += (1 << FRAC_W); end
        acc = s;
      end
      @(posedge clk); #1;
      checks++;
      if (int'(mu) != int'(acc >> (FRAC_W - MU_W)) || slip_late != el || slip_early != ee) begin
        failures++;
        $display("i=%0d mu=%0d exp=%0d late=%0b/%0b early=%0b/%0b", i, mu,
                 acc >> (FRAC_W - MU_W), slip_late, el, slip_early, ee);
      end
      n_late += int'(slip_late); n_early += int'(slip_early);
    end
    checks++;
    if (n_late < 5 || n_early < 5) begin failures++; $display("slips %0d %0d", n_late, n_early); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
