// sumet_adder_a: first adder stage of the SUMET processor (ADDER_A/ADDER_B).
//
// Every 66 ns the twelve CRATESUM words carry the E_t of one wedge per
// sector (even wedges first, odd wedges second). Because each quadrant of
// the wedge map mirrors its neighbours, four wedges share one |cos| or
// |sin| factor. For sector group g (g = 0,1,2) this stage forms
//   X_g = (S_g + S_(11-g)) - (S_(5-g) + S_(6+g))   (feeds a cos factor)
//   Y_g = (S_g + S_(5-g))  - (S_(6+g) + S_(11-g))  (feeds a sin factor)
// as 12-bit two's complement words with a 0.5 GeV LSB. The six unsigned
// pair sums S_g + S_(11-g) and S_(5-g) + S_(6+g) start the SumEt chain.
// `sat` flags an input word with all bits set (saturated E_t).
//
// Interface: etin[i] is the word from CRATESUM i; ps[0..2] = X_0..X_2,
// ps[3..5] = Y_0..Y_2; et_pair[2g] = S_g + S_(11-g), et_pair[2g+1] =
// S_(5-g) + S_(6+g). Timing: one register (the partial_sum register),
// loaded when ce (clk_66ns) is high; ps_even tells which phase it holds.
// The groupings follow the specification; the register shape is a choice.
module sumet_adder_a
  import prefred_pkg::*;
(
  input  logic              clk,
  input  logic              ce,
  input  logic              even_in,
  input  et_t               etin [N_CS],
  output ps_t               ps [6],
  output logic [ET_W:0]     et_pair [6],
  output logic              sat,
  output logic              ps_even
);
  ps_t           ps_d   [6];
  logic [ET_W:0] pair_d [6];
  logic          sat_d;

  always_comb begin
    for (int g = 0; g < 3; g++) begin
      logic [ET_W:0] a, b, c, d;
      a = {1'b0, etin[g]}    + {1'b0, etin[11-g]};   // cos '+' pair
      b = {1'b0, etin[5-g]}  + {1'b0, etin[6+g]};    // cos '-' pair
      c = {1'b0, etin[g]}    + {1'b0, etin[5-g]};    // sin '+' pair
      d = {1'b0, etin[6+g]}  + {1'b0, etin[11-g]};   // sin '-' pair
      ps_d[g]       = ps_t'({1'b0, a}) - ps_t'({1'b0, b});
      ps_d[3+g]     = ps_t'({1'b0, c}) - ps_t'({1'b0, d});
      pair_d[2*g]   = a;
      pair_d[2*g+1] = b;
    end
    sat_d = 1'b0;
    for (int i = 0; i < N_CS; i++)
      if (&etin[i]) sat_d = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (ce) begin
      ps      <= ps_d;
      et_pair <= pair_d;
      sat     <= sat_d;
      ps_even <= even_in;
    end
  end
endmodule
