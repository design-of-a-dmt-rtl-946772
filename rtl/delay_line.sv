// delay_line: a DEPTH-sample delay built as a circular buffer in a memory.
//
// Each accepted input (in_valid) is written at the write pointer while the word
// stored there DEPTH samples earlier is read out on dout in the same cycle, so
// dout is din delayed by exactly DEPTH valid samples. Until DEPTH samples have
// been written, dout is zero, so the memory needs no reset. The receiver uses
// one 8192-sample line (the FFT size) and one 640-sample line (the cyclic
// prefix) in its delay correlator; their lengths are the design's, the
// circular-buffer structure is this implementation's choice.
module delay_line #(
  parameter int unsigned DEPTH = 8192,
  parameter int unsigned W     = 12
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] ptr;
  logic          full;

  assign dout = full ? mem[ptr] : '0;

  always_ff @(posedge clk) begin
    if (in_valid) mem[ptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr  <= '0;
      full <= 1'b0;
    end else if (in_valid) begin
      if (ptr == AW'(DEPTH - 1)) begin
        ptr  <= '0;
        full <= 1'b1;
      end else begin
        ptr <= ptr + 1'b1;
      end
    end
  end
endmodule
