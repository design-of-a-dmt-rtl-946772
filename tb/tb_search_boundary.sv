// tb_search_boundary: feeds a correlator-like sequence with a known peak and
// checks that nothing is detected below the threshold, that sb_success comes
// exactly SYM samples after the crossing, and that max_age counts the
// samples since the maximum. Repeated for several peak positions.
module tb_search_boundary;
  localparam int CW = 20, TW = 20, SYM = 20;
  logic clk = 0, rst_n = 0, enable = 0, cs_valid = 0;
  logic signed [CW-1:0] cs = '0;
  logic [TW-1:0] threshold = 20'd1000;
  logic detected, sb_success;
  logic [$clog2(SYM)-1:0] max_age;
  int checks = 0, failures = 0;

  search_boundary #(.CW(CW), .TW(TW), .SYM(SYM)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int peak_pos);
    int succ_at, k;
    // a few samples below threshold (and one negative), then a window
    enable = 1;
    succ_at = -1;
    k = 0;
    for (int i = 0; i < 10 + SYM + 5; i++) begin
      @(negedge clk);
      cs_valid = 1;
      if (i < 10)              cs = (i == 3) ? -20'sd5000 : CW'(i * 50);
      else if (i >= 10 + SYM)  cs = '0;
      else if (i - 10 == peak_pos) cs = 20'sd9000;
      else                     cs = CW'(2000 + 10 * ((i * 7) % 13));
      @(posedge clk); #1;
      if (sb_success) begin
        checks++;
        // crossing at sample 10; success right after the SYM-th sample (index 10+SYM-1)
        if (i != 10 + SYM - 1) begin failures++; $display("sb_success at %0d", i); end
        checks++;
        if (int'(max_age) != SYM - 1 - peak_pos) begin
          failures++; $display("max_age %0d exp %0d", max_age, SYM - 1 - peak_pos);
        end
        k++;
      end
      if (i < 10) begin
        checks++;
        if (detected) begin failures++; $display("early detect at %0d", i); end
      end
    end
    checks++;
    if (k != 1) begin failures++; $display("sb_success count %0d", k); end
    cs_valid = 0;
    enable = 0;
    @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(0);
    run(7);
    run(SYM - 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
