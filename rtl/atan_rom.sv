// atan_rom: arctangent table for pilot phase estimation.
//
// Entry a (a = 0..256) holds round(atan(a/256) * 4096 / (2*pi)): the angle of a
// ratio a/256 in [0, 1] in phase units of 2*pi/4096, so entry 256 is pi/4 = 512.
// The table is read from rtl/atan_rom.hex (paths are relative to the directory
// the simulator runs in). The design names an arctangent ROM; its size and
// resolution are this implementation's choice. Combinational read.
module atan_rom #(
  parameter int unsigned AW = 9,
  parameter int unsigned DW = 10
) (
  input  logic [AW-1:0] addr,
  output logic [DW-1:0] data
);
  localparam int unsigned DEPTH = 257;
  logic [DW-1:0] rom [DEPTH];

  initial $readmemh("rtl/atan_rom.hex", rom);

  assign data = (int'(addr) < DEPTH) ? rom[addr] : rom[DEPTH-1];
endmodule
