// towtrg_data_processor: the TOWTRG program of the Data Processor FPGA.
//
// The same board as SUMET, loaded with a different program: the twelve
// CRATESUM words of the first 66 ns (di-object counts first, as they take
// longer to add) and of the second 66 ns are registered, condensed by
// towtrg_logic into one 20-bit detector summary within one crossing, and
// the summary goes both to the L1 FIFO side (`summary`) and, through the
// same FRED alignment pipeline as SUMET (20 bits wide), to FRED.
//
// Timing (lphase from CS_132ns): first packet registered at lphase 0,
// second at lphase 3, summary registered at the next lphase 0, i.e. one
// crossing after the first packet; FRED output delayed further by
// fred_delay as in fred_pipeline.
module towtrg_data_processor (
  input  logic         clk,
  input  logic [2:0]   lphase,
  input  logic         ce_66,
  input  logic         ce_cs132,
  input  logic         even,
  input  logic [119:0] csin,
  input  logic [5:0]   fred_delay,
  output logic [19:0]  summary,
  output logic [19:0]  tofred
);
  logic [9:0]  first_q  [12];
  logic [9:0]  second_q [12];
  logic [19:0] summary_d;

  always_ff @(posedge clk)
    if (ce_66) begin
      for (int i = 0; i < 12; i++) begin
        if (even) first_q[i]  <= csin[10*i +: 10];
        else      second_q[i] <= csin[10*i +: 10];
      end
    end

  towtrg_logic u_logic (.first(first_q), .second(second_q), .summary(summary_d));

  always_ff @(posedge clk)
    if (ce_cs132) summary <= summary_d;

  fred_pipeline #(.W(20)) u_fred (
    .clk, .ce_cs132, .lphase, .fred_delay, .din(summary_d), .dout(tofred));
endmodule
