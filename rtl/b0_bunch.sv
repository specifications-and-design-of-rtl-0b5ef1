// b0_bunch: Bunch-0 delay and bunch counter.
//
// The trigger supervisor marks bunch 0 once per revolution. The board
// delays that mark by B0_offset crossings (0..MAXDLY-1, programmed over
// VME) to match its position in the L1 pipeline, giving b0_delayed, and
// counts crossings with an 8-bit bunch counter that b0_delayed clears.
//
// Timing: b0 is sampled on the CDF tick (ce). b0_delayed is high for the
// one crossing that starts B0_offset crossings after the sampling tick,
// and bunch is 0 during that same crossing and counts up by one per
// crossing afterwards. The offset delay follows the specification; the
// counter's exact reset convention is this design's choice.
module b0_bunch #(
  parameter int unsigned MAXDLY = 64
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       ce,
  input  logic       b0,
  input  logic [5:0] b0_offset,
  output logic       b0_delayed,
  output logic [7:0] bunch
);
  logic [MAXDLY-1:0] sr;
  logic              tap;

  assign tap = (b0_offset == 6'd0) ? b0 : sr[b0_offset - 6'd1];

  always_ff @(posedge clk) begin
    if (rst) begin
      sr         <= '0;
      b0_delayed <= 1'b0;
      bunch      <= '0;
    end else if (ce) begin
      sr         <= {sr[MAXDLY-2:0], b0};
      b0_delayed <= tap;
      bunch      <= tap ? 8'd0 : bunch + 8'd1;
    end
  end
endmodule
