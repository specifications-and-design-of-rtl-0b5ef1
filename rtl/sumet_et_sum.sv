// sumet_et_sum: the SumEt adder chain.
//
// The six unsigned pair sums from the first adder stage (0.5 GeV LSB) of
// each 66 ns phase are added into a half-sum. The half-sums of the even
// and odd phases are then added, the LSB dropped (1 GeV LSB) and the result
// limited to 11 bits (2048 GeV full scale): anything larger sets `ovf` and
// the output word is forced to all ones.
//
// Timing: the half-sum registers load on ce66 (both clk_66ns edges); the
// total loads on ce_out, the CS_132ns tick after the odd half-sum. Width,
// least count and saturation follow the specification; the split of the
// cascade into two registered adds is this design's.
module sumet_et_sum
  import prefred_pkg::*;
(
  input  logic          clk,
  input  logic          ce66,
  input  logic          ce_out,
  input  logic [ET_W:0] et_pair [6],
  output logic [10:0]   sumet,
  output logic          ovf
);
  logic [13:0] half_q, half_prev;
  logic [13:0] half_d;
  logic [14:0] total;

  always_comb begin
    half_d = '0;
    for (int k = 0; k < 6; k++) half_d += 14'(et_pair[k]);
    total = {1'b0, half_prev} + {1'b0, half_q};
  end

  always_ff @(posedge clk) begin
    if (ce66) begin
      half_q    <= half_d;
      half_prev <= half_q;
    end
    if (ce_out) begin
      ovf   <= |total[14:12];
      sumet <= (|total[14:12]) ? 11'h7FF : total[11:1];
    end
  end
endmodule
