// square_rom: 512 x 18 look-up table returning the square of its address.
//
// Stands for the embedded memory block that squares |SumEx| or |SumEy|
// (9 bits, 0.5 GeV LSB) into an 18-bit result with a 0.25 GeV^2 LSB. The
// contents are i*i, filled at elaboration. Registered read: q is valid the
// tick after a tick with ce high.
module square_rom (
  input  logic        clk,
  input  logic        ce,
  input  logic [8:0]  addr,
  output logic [17:0] q
);
  logic [17:0] rom [512];

  initial
    for (int i = 0; i < 512; i++) rom[i] = 18'(i * i);

  always_ff @(posedge clk)
    if (ce) q <= rom[addr];
endmodule
