// bit_alloc_table: number of bits carried by each tone.
//
// A memory of N_TONES entries of 4 bits (0 to 15 bits per tone, BPSK up to
// 32768-QAM). It is written through a load port (from bit loading done by the
// host after channel estimation) and read with the tone counter's index.
// The table and its 4-bit output follow the design; the write port is this
// implementation's choice. Combinational read.
module bit_alloc_table
  import vdsl_pkg::*;
#(
  parameter int unsigned DEPTH = N_TONES,
  parameter int unsigned AW    = TONE_W
) (
  input  logic              clk,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [BITS_W-1:0] wdata,
  input  logic [AW-1:0]     raddr,
  output logic [BITS_W-1:0] rdata
);
  logic [BITS_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];
endmodule
