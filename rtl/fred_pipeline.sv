// fred_pipeline: alignment delay of the trigger bits sent to FRED.
//
// All PreFRED modules must present their bits to FRED in phase, so the
// bits (and the B0 tag) are delayed by a programmable amount:
// fred_delay[5:3] is a coarse delay of 0-7 crossings, taken from an 8-deep
// shift register clocked at CS_132ns, and fred_delay[2:0] a fine delay of
// 0-5 ticks of 22 ns (6 and 7 act as 5), which on the board selects one of
// six phase-shifted 132 ns clocks to latch the output.
//
// Timing: din is sampled at the CS_132ns tick (ce_cs132, lphase 0) into
// stage 0; stage c is c crossings older. The output register copies stage
// `coarse` at the tick with lphase = fine + 1 (mod 6), so the total delay
// from the stage-0 load is 132 ns * coarse + 22 ns * (fine + 1).
// Shift-register depth and delay format follow the specification.
module fred_pipeline #(
  parameter int unsigned W = 5
) (
  input  logic         clk,
  input  logic         ce_cs132,
  input  logic [2:0]   lphase,
  input  logic [5:0]   fred_delay,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);
  logic [W-1:0] sr [8];
  logic [2:0]   fine;
  logic [2:0]   load_phase;

  always_comb begin
    fine       = (fred_delay[2:0] > 3'd5) ? 3'd5 : fred_delay[2:0];
    load_phase = (fine == 3'd5) ? 3'd0 : fine + 3'd1;
  end

  always_ff @(posedge clk) begin
    if (ce_cs132) begin
      sr[0] <= din;
      for (int i = 1; i < 8; i++) sr[i] <= sr[i-1];
    end
    if (lphase == load_phase)
      dout <= sr[fred_delay[5:3]];
  end
endmodule
