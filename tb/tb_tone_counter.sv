// tb_tone_counter: symbols of varying length with gaps in tone_valid; the
// index must be 0 on stating and count each valid tone.
module tb_tone_counter;
  localparam int W = 12;
  logic clk = 0, rst_n = 0, tone_valid = 0, stating = 0;
  logic [W-1:0] idx;
  int checks = 0, failures = 0;

  tone_counter #(.W(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 6; s++) begin
      int len;
      len = $urandom_range(50, 300);
      for (int k = 0; k < len; k++) begin
        @(negedge clk);
        tone_valid = 1;
        stating = (k == 0);
        #1;
        checks++;
        if (int'(idx) != k) begin failures++; $display("sym %0d tone %0d idx %0d", s, k, idx); end
        if ($urandom_range(0, 4) == 0) begin
          @(negedge clk) tone_valid = 0; stating = 0;
        end
      end
      @(negedge clk) tone_valid = 0; stating = 0;
      repeat (5) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
