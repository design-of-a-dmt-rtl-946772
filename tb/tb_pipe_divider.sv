// tb_pipe_divider: one operand per clock through the pipelined divider;
// every result must be floor(num/den) (saturated to all ones when it does
// not fit or den = 0), arrive Q_W+1 cycles later and carry its tag.
module tb_pipe_divider;
  localparam int NUM_W = 42, DEN_W = 30, Q_W = 26, TAG_W = 8;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [NUM_W-1:0] num = '0;
  logic [DEN_W-1:0] den = '0;
  logic [TAG_W-1:0] tag_in = '0, tag_out;
  logic [Q_W-1:0] q;
  int checks = 0, failures = 0, n_sat = 0;
  longint expq [$], exptag [$], expcyc [$];
  int cyc = 0;

  pipe_divider #(.NUM_W(NUM_W), .DEN_W(DEN_W), .Q_W(Q_W), .TAG_W(TAG_W)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #1;
    if (out_valid) begin
      checks++;
      if (expq.size() == 0 || longint'(q) != expq[0] || longint'(tag_out) != exptag[0]
          || cyc != expcyc[0]) begin
        failures++;
        $display("q=%0d exp=%0d tag=%0d cyc=%0d expcyc=%0d", q, expq[0], tag_out, cyc, expcyc[0]);
      end
      if (expq.size()) begin
        void'(expq.pop_front()); void'(exptag.pop_front()); void'(expcyc.pop_front());
      end
    end
  end

  initial begin
    longint n, d, e;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      n = longint'(1) << 41;
      if (i % 3 == 0) n = {$urandom, $urandom} & ((64'd1 << NUM_W) - 1);
      d = longint'({$urandom, $urandom} >> $urandom_range(34, 63));
      if (i % 97 == 5) d = 0;
      num = NUM_W'(n); den = DEN_W'(d); tag_in = TAG_W'(i);
      if (in_valid) begin
        if (d == 0 || (n / d) >= (64'd1 << Q_W)) begin e = (64'd1 << Q_W) - 1; n_sat++; end
        else e = n / d;
        expq.push_back(e); exptag.push_back(i % 256); expcyc.push_back(cyc + Q_W + 1);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (Q_W + 5) @(posedge clk);
    checks++;
    if (expq.size() != 0 || n_sat == 0) begin failures++; $display("left %0d sat %0d", expq.size(), n_sat); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
