// tb_bit_alloc_table: loads a random allocation, then reads every entry
// back and compares with the model array.
module tb_bit_alloc_table;
  localparam int DEPTH = 256, AW = 12;
  logic clk = 0, we = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [3:0] wdata = '0, rdata;
  logic [3:0] model [DEPTH];
  int checks = 0, failures = 0;

  bit_alloc_table #(.DEPTH(DEPTH), .AW(AW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int pass = 0; pass < 2; pass++) begin
      for (int a = 0; a < DEPTH; a++) begin
        @(negedge clk);
        we = 1; waddr = AW'(a); wdata = 4'($urandom); model[a] = wdata;
      end
      @(negedge clk) we = 0;
      for (int a = DEPTH - 1; a >= 0; a--) begin
        @(negedge clk);
        raddr = AW'(a);
        #1;
        checks++;
        if (rdata !== model[a]) begin failures++; $display("addr %0d %h %h", a, rdata, model[a]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
