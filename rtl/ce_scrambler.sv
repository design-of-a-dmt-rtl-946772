// ce_scrambler: regenerates the known QPSK training sequence.
//
// During channel estimation every tone carries a QPSK point from a
// pseudo-random bit sequence shared with the transmitter. This block steps a
// 9-bit PRBS, d(n) = d(n-4) xor d(n-9), seeded with all ones, two bits per
// tone: the first bit gives the sign of the real part (1 = negative), the
// second the sign of the imaginary part. The polynomial and the seed are this
// implementation's assumption; the design names the scrambler only.
// Timing: init reseeds; each advance moves to the next tone. bits is the pair
// for the current tone (combinational from the state).
module ce_scrambler (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       init,
  input  logic       advance,
  output logic [1:0] bits
);
  logic [8:0] sr;     // sr[0] = d(n-1) ... sr[8] = d(n-9)
  logic       b0, b1;

  always_comb begin
    b0   = sr[3] ^ sr[8];
    b1   = sr[2] ^ sr[7];        // next bit after b0
    bits = {b1, b0};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       sr <= '1;
    else if (init)    sr <= '1;
    else if (advance) sr <= {sr[6:0], b0, b1};
  end
endmodule
