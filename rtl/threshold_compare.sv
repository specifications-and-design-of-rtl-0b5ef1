// threshold_compare: trigger threshold registers and comparators.
//
// Four 16-bit thresholds are written by VME two at a time: select 0
// (VME A[2] = 0) writes thresholds 0 and 1 from D[15:0] and D[31:16],
// select 1 writes thresholds 2 and 3 likewise; reads return the same pair.
// Trigger bit k is 1 when its quantity is above threshold k, or when that
// quantity overflowed (so a saturating event is accepted). By default bits
// 0-1 compare SumEt (11 bits of the threshold used) and bits 2-3 compare
// MET^2 (16 bits); NUM_MET_THR = 3 or 4 turns the lower slots into MET^2
// thresholds too, the reconfiguration the specification asks for (how it
// is selected is this design's choice).
//
// Timing: thresholds are written at the clk edge while thr_we is high
// (reset to 0); trig is combinational from the inputs.
module threshold_compare #(
  parameter int unsigned NUM_MET_THR = 2
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        thr_we,
  input  logic        thr_sel,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  input  logic [10:0] sumet,
  input  logic        et_ovf,
  input  logic [15:0] metsq,
  input  logic        met_ovf,
  output logic [3:0]  trig
);
  logic [15:0] thr [4];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < 4; k++) thr[k] <= '0;
    end else if (thr_we) begin
      thr[2*thr_sel]   <= wdata[15:0];
      thr[2*thr_sel+1] <= wdata[31:16];
    end
  end

  always_comb begin
    rdata = thr_sel ? {thr[3], thr[2]} : {thr[1], thr[0]};
    for (int k = 0; k < 4; k++) begin
      if (k >= 4 - int'(NUM_MET_THR))
        trig[k] = met_ovf | (metsq > thr[k]);
      else
        trig[k] = et_ovf | (sumet > thr[k][10:0]);
    end
  end
endmodule
