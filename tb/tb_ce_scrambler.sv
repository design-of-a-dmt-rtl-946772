// tb_ce_scrambler: compares the two bits per tone with a bit-serial model
// of the sequence d(n) = d(n-4) xor d(n-9) started from nine ones, across
// random advance gaps and a re-initialisation.
module tb_ce_scrambler;
  logic clk = 0, rst_n = 0, init = 0, advance = 0;
  logic [1:0] bits;
  int checks = 0, failures = 0;

  ce_scrambler dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit seq [$];
  function automatic bit nextbit();
    bit b;
    b = seq[seq.size() - 4] ^ seq[seq.size() - 9];
    seq.push_back(b);
    return b;
  endfunction

  initial begin
    bit b0, b1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      seq.delete();
      repeat (9) seq.push_back(1'b1);
      if (pass == 1) begin
        @(negedge clk) init = 1;
        @(negedge clk) init = 0;
      end
      for (int t = 0; t < 700; t++) begin
        @(negedge clk);
        b0 = nextbit(); b1 = nextbit();
        checks++;
        if (bits !== {b1, b0}) begin
          failures++;
          $display("pass %0d tone %0d bits=%b exp=%b", pass, t, bits, {b1, b0});
        end
        advance = 1;
        @(negedge clk);
        advance = 0;
        repeat ($urandom_range(0, 2)) @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
