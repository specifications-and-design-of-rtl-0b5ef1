// sumet_xy_sum: weighted-sum stage giving SumEx and SumEy.
//
// The six LUT outputs change every 66 ns. Two registers in series, sumodd
// (loaded from the LUT data) and sumeven (loaded from sumodd), hold the
// even-phase and odd-phase products of one crossing side by side. In the
// even phase LUT_0..2 carry cos-weighted terms and LUT_3..5 sin-weighted
// ones; in the odd phase the roles swap. So
//   SumEx = even(LUT_0+LUT_1+LUT_2) + odd(LUT_3+LUT_4+LUT_5)
//   SumEy = even(LUT_3+LUT_4+LUT_5) + odd(LUT_0+LUT_1+LUT_2)
// in 0.25 GeV units. The result is reduced to sign + 9-bit magnitude with
// a 0.5 GeV LSB: magnitudes of 256 GeV or more set the overflow flag (the
// MSB of the 512 GeV word is the overflow bit and the LSB is dropped).
//
// Timing: sumodd/sumeven load on ce66 (both clk_66ns edges); the output
// registers load on ce_out, which must be the CS_132ns tick that follows
// the odd-phase load. The adder cascade of the board (three levels plus a
// register) is written here as one registered sum: a simplification.
module sumet_xy_sum
  import prefred_pkg::*;
(
  input  logic       clk,
  input  logic       ce66,
  input  logic       ce_out,
  input  lut_data_t  lut_data [N_LUT],
  output logic       ex_sign,
  output logic [8:0] ex_mag,
  output logic       ex_ovf,
  output logic       ey_sign,
  output logic [8:0] ey_mag,
  output logic       ey_ovf
);
  lut_data_t sumodd [N_LUT];
  lut_data_t sumeven [N_LUT];
  logic signed [15:0] sx, sy;
  logic [15:0] ax, ay;

  always_ff @(posedge clk)
    if (ce66) begin
      sumodd  <= lut_data;
      sumeven <= sumodd;
    end

  always_comb begin
    sx = '0;
    sy = '0;
    for (int k = 0; k < 3; k++) begin
      sx += 16'(lut_to_signed(sumeven[k])) + 16'(lut_to_signed(sumodd[3+k]));
      sy += 16'(lut_to_signed(sumeven[3+k])) + 16'(lut_to_signed(sumodd[k]));
    end
    ax = sx[15] ? 16'(-sx) : 16'(sx);
    ay = sy[15] ? 16'(-sy) : 16'(sy);
  end

  always_ff @(posedge clk)
    if (ce_out) begin
      ex_sign <= sx[15];
      ex_ovf  <= (ax >= 16'd1024);
      ex_mag  <= ax[9:1];
      ey_sign <= sy[15];
      ey_ovf  <= (ay >= 16'd1024);
      ey_mag  <= ay[9:1];
    end
endmodule
