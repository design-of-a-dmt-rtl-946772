// tb_seq_divider: random num <= den (and the edge cases num = 0, num = den);
// q must be floor(num * 2**FRAC / den) and done must come FRAC+2 cycles
// after start.
module tb_seq_divider;
  localparam int W = 15, FRAC = 8;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [W-1:0] num = '0, den = '0;
  logic [FRAC:0] q;
  int checks = 0, failures = 0;

  seq_divider #(.W(W), .FRAC(FRAC)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    longint exp;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      den = W'($urandom_range(1, 32767));
      if (i % 50 == 0)      num = den;
      else if (i % 50 == 1) num = '0;
      else                  num = W'($urandom_range(0, int'(den)));
      start = 1;
      @(negedge clk);
      start = 0;
      lat = 1;
      while (!done && lat < 100) begin @(negedge clk); lat++; end
      exp = (longint'(num) << FRAC) / longint'(den);
      checks++;
      if (longint'(q) != exp || lat != FRAC + 2) begin
        failures++;
        $display("num=%0d den=%0d q=%0d exp=%0d lat=%0d", num, den, q, exp, lat);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
