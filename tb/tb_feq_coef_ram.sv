// tb_feq_coef_ram: random writes and synchronous reads (data one cycle
// after the address) against a model array, with simultaneous read and write
// of different addresses.
module tb_feq_coef_ram;
  import vdsl_pkg::*;
  localparam int DEPTH = 64, AW = 12;
  logic clk = 0, re = 0, we = 0;
  logic [AW-1:0] raddr = '0, waddr = '0;
  coef_t rdata, wdata = '0;
  coef_t model [DEPTH];
  int checks = 0, failures = 0;

  feq_coef_ram #(.DEPTH(DEPTH), .AW(AW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    coef_t exp;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a); wdata = {GW'($urandom), GW'($urandom)}; model[a] = wdata;
    end
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      re = 1; raddr = AW'($urandom_range(0, DEPTH - 1));
      exp = model[raddr];
      we = ($urandom_range(0, 1) == 1);
      waddr = AW'($urandom_range(0, DEPTH - 1));
      if (waddr == raddr) waddr = AW'((int'(raddr) + 1) % DEPTH);
      wdata = {GW'($urandom), GW'($urandom)};
      if (we) model[waddr] = wdata;
      @(posedge clk); #1;
      checks++;
      if (rdata !== exp) begin failures++; $display("read %0d got %h exp %h", raddr, rdata, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
