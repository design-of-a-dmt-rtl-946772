// feq_coef_ram: the FEQ coefficient registers, one complex coefficient per tone.
//
// N_TONES words of two GW-bit components. The channel estimation / FEQ block
// reads a tone's coefficient with a synchronous read (data one cycle after the
// address) and writes the updated value back later in its pipeline; as each
// tone is visited once per symbol, reads and writes of one address never
// collide. Size follows the design (4096 points); the port arrangement is this
// implementation's choice.
module feq_coef_ram
  import vdsl_pkg::*;
#(
  parameter int unsigned DEPTH = N_TONES,
  parameter int unsigned AW    = TONE_W
) (
  input  logic          clk,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output coef_t         rdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  coef_t         wdata
);
  coef_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
