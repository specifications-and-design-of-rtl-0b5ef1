// phi_lut_sram: one 16K x 16 fast static RAM used as a phi-weighting LUT.
//
// The board uses an asynchronous SRAM (read in under 15 ns, well inside a
// 22 ns tick): the address is a 12-bit signed partial sum and the data word
// is that sum multiplied by one cos/sin factor, coded as bit 11 = sign and
// bits 10:0 = magnitude with a 0.25 GeV LSB (2047 = saturated above 512 GeV).
// The contents are written by VME after power-up.
//
// Interface: dout follows addr combinationally (asynchronous read); a word
// is written at the rising clk edge while `we` is high. Writing on the
// clock edge is this design's choice; size and data format follow the
// specification.
module phi_lut_sram #(
  parameter int unsigned AW = 14,
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  logic [DW-1:0] din,
  output logic [DW-1:0] dout
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk)
    if (we) mem[addr] <= din;

  assign dout = mem[addr];
endmodule
