// tb_delay_correlator: drives random samples and compares every cs with a
// direct evaluation of sum_{j=i-NG+1..i} r(j) r(j-N) (r = 0 before the start),
// and checks the two-cycle latency.
module tb_delay_correlator;
  localparam int N = 16, NG = 4, SW = 12;
  localparam int CW = 2 * SW + $clog2(NG) + 1;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [SW-1:0] r = '0;
  logic cs_valid;
  logic signed [CW-1:0] cs;
  int checks = 0, failures = 0;
  longint hist [$];
  longint expq [$];

  delay_correlator #(.N(N), .NG(NG), .SW(SW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint samp(int j);
    return (j < 0) ? 0 : hist[j];
  endfunction

  // expected values, pushed when a sample is accepted
  always @(posedge clk) begin
    if (rst_n && in_valid) begin
      longint s;
      int i;
      hist.push_back(longint'(r));
      i = hist.size() - 1;
      s = 0;
      for (int j = i - NG + 1; j <= i; j++) s += samp(j) * samp(j - N);
      expq.push_back(s);
    end
  end

  // the result of a sample accepted at edge t shows at edge t+2
  logic v1 = 0, v2 = 0;
  always @(posedge clk) begin
    v2 <= v1; v1 <= rst_n && in_valid;
    if (v2) begin
      checks++;
      if (!cs_valid || expq.size() == 0 || longint'(cs) != expq[0]) begin
        failures++;
        $display("cs mismatch: valid=%0b cs=%0d exp=%0d", cs_valid, cs, expq.size() ? expq[0] : -1);
      end
      if (expq.size()) void'(expq.pop_front());
    end else if (rst_n && cs_valid) begin
      failures++;
      $display("unexpected cs_valid");
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      in_valid = (i < 100) ? 1'b1 : ($urandom_range(0, 2) != 0);
      r = SW'($signed($urandom_range(0, 4095)) - 2048);
      if (i % 37 == 0) r = -12'sd2048;
    end
    @(negedge clk) in_valid = 0;
    repeat (5) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
