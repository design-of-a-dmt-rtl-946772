// tb_delay_line: checks that dout is din delayed by exactly DEPTH accepted
// samples (zero before the line is full), with random gaps in in_valid,
// against a software queue.
module tb_delay_line;
  localparam int DEPTH = 5, W = 8;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [W-1:0] din = '0, dout;
  int checks = 0, failures = 0;
  logic [W-1:0] hist [$];

  delay_line #(.DEPTH(DEPTH), .W(W)) dut (.*);
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
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      din = W'($urandom);
      #1;
      if (in_valid) begin
        logic [W-1:0] exp;
        exp = (hist.size() >= DEPTH) ? hist[hist.size() - DEPTH] : '0;
        checks++;
        if (dout !== exp) begin
          failures++;
          $display("mismatch at %0d: dout=%h exp=%h", i, dout, exp);
        end
        hist.push_back(din);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
