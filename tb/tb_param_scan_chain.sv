// tb_param_scan_chain: checks the reset defaults, shifts in random words
// most significant bit first, compares params, and checks that scan_out
// returns the previous word bit by bit.
module tb_param_scan_chain;
  import vdsl_pkg::*;
  logic clk = 0, rst_n = 0, scan = 0, scan_in = 0, scan_out;
  rx_params_t params;
  int checks = 0, failures = 0;

  param_scan_chain dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [PARAMS_W-1:0] w, prev, outw;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (params !== PARAMS_DEFAULT) begin failures++; $display("default mismatch"); end
    rst_n = 1;
    prev = PARAMS_DEFAULT;
    for (int k = 0; k < 5; k++) begin
      for (int b = 0; b < PARAMS_W; b++) w[b] = $urandom_range(0, 1);
      for (int b = PARAMS_W - 1; b >= 0; b--) begin
        @(negedge clk);
        scan = 1; scan_in = w[b];
        outw[b] = scan_out;
      end
      @(negedge clk) scan = 0; scan_in = 0;
      repeat (3) @(negedge clk);
      checks++;
      if (params !== rx_params_t'(w)) begin failures++; $display("load %0d mismatch", k); end
      checks++;
      if (outw !== prev) begin failures++; $display("scan_out %0d mismatch", k); end
      prev = w;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
