// met_square: missing E_t squared from |SumEx| and |SumEy|.
//
// Each 9-bit magnitude (0.5 GeV LSB, 256 GeV full scale) addresses a
// 512 x 18 square table; the two squares (0.25 GeV^2 LSB) are added, the
// two LSBs dropped (1 GeV^2 LSB) and the result kept on 16 bits. A carry
// out of 16 bits, or any overflow already flagged on the way (ovf_in: an
// overflowed SumEx/SumEy or a saturated input), forces metsq to 16'hFFFF
// and sets ovf.
//
// Timing: the tables are read on the tick where ce_sq is high (ovf_in is
// sampled then too); the sum is registered on the later tick where ce_add
// is high. Formats follow the specification.
module met_square (
  input  logic        clk,
  input  logic        ce_sq,
  input  logic        ce_add,
  input  logic [8:0]  ex_mag,
  input  logic [8:0]  ey_mag,
  input  logic        ovf_in,
  output logic [15:0] metsq,
  output logic        ovf
);
  logic [17:0] sqx, sqy;
  logic        ovf_q;
  logic [18:0] sum;

  square_rom u_sqx (.clk, .ce(ce_sq), .addr(ex_mag), .q(sqx));
  square_rom u_sqy (.clk, .ce(ce_sq), .addr(ey_mag), .q(sqy));

  always_ff @(posedge clk)
    if (ce_sq) ovf_q <= ovf_in;

  assign sum = {1'b0, sqx} + {1'b0, sqy};

  always_ff @(posedge clk)
    if (ce_add) begin
      ovf   <= ovf_q | sum[18];
      metsq <= (ovf_q | sum[18]) ? 16'hFFFF : sum[17:2];
    end
endmodule
