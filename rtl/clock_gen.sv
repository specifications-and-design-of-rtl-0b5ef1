// clock_gen: timing grid of the PreFRED board.
//
// The board derives all its clocks from CDF_clk (132 ns). On the board this
// is done with a duty-cycle symmetriser and 22 ns tap delay lines; here the
// same grid is expressed on one 22 ns clock `clk` (six ticks per crossing).
// A tick counter `phase` is re-aligned on every rising edge of CDF_clk seen
// by clk. CDF_clk passes two sampling flops, so phase 0 is the tick at which
// the edge has come through them (a fixed two-tick offset, absorbed by
// CS_delay like any cable delay).
//
// CS_132ns is the tap selected by CS_delay (0..5 ticks after CDF_clk; 6 and 7
// act as 5). `lphase` counts ticks from CS_132ns. clk_66ns rises with
// CS_132ns and 66 ns later, i.e. at lphase 0 and 3; `even` marks the first
// half of the crossing, when the CRATESUMs send the even wedges.
//
// All outputs are decoded from registers, valid every tick. The one-tick
// pulses ce_cdf, ce_cs132 and ce_66 are used as clock enables elsewhere.
module clock_gen (
  input  logic       clk,
  input  logic       rst,
  input  logic       cdf_clk,
  input  logic [2:0] cs_delay,
  output logic [2:0] phase,
  output logic [2:0] lphase,
  output logic       ce_cdf,
  output logic       ce_cs132,
  output logic       ce_66,
  output logic       even
);
  logic       cdf_q1, cdf_q2;
  logic [2:0] phase_q;
  logic [2:0] csd;
  logic [3:0] diff;

  always_ff @(posedge clk) begin
    if (rst) begin
      cdf_q1  <= 1'b0;
      cdf_q2  <= 1'b0;
      phase_q <= '0;
    end else begin
      cdf_q1 <= cdf_clk;
      cdf_q2 <= cdf_q1;
      if (cdf_q1 && !cdf_q2)
        phase_q <= 3'd1;            // this tick is phase 0
      else
        phase_q <= (phase_q == 3'd5) ? 3'd0 : phase_q + 3'd1;
    end
  end

  always_comb begin
    csd    = (cs_delay > 3'd5) ? 3'd5 : cs_delay;
    phase  = phase_q;
    diff   = {1'b0, phase_q} + 4'd6 - {1'b0, csd};
    lphase = (diff >= 4'd6) ? 3'(diff - 4'd6) : diff[2:0];
    ce_cdf   = (phase_q == 3'd0);
    ce_cs132 = (lphase == 3'd0);
    ce_66    = (lphase == 3'd0) || (lphase == 3'd3);
    even     = (lphase < 3'd3);
  end
endmodule
