// daq_interface: L1 FIFOs, DAQ buffers and the L2 output of the board.
//
// Every crossing the Data Processor output (56 bits) and the 8-bit bunch
// number are written into eight 256 x 9 L1 FIFOs (72 bits, bits 71:64
// unused). On an L1 accept or reject the Controller pops one entry; on an
// accept it then writes the entry into the DAQ buffer named by L1BA, one
// of four buffers of four 32-bit words that VME reads after an L2 accept:
//   word 0 = {board ID[23:0], bunch number}
//   word 1 = {8'h00, DAQ word 2 bits 23:0}   (trigger bits, MET^2)
//   word 2 = DAQ word 3                     (B0, SumEy, SumEx, SumEt)
//   word 3 = {21'b0, SumEt of the previous crossing}
// The previous-crossing register takes SumEt of the popped entry at the
// next pop, so it always holds the entry popped before the current one.
// The popped SumEt, SumEx and SumEy (31 bits) also drive the L2 cable.
// For diagnostics a VME write fills all FIFOs with {D[7:0], D, D} (this
// design's choice of how the 32-bit pattern covers the 72 FIFO bits).
//
// Timing: all strobes are one-tick pulses on clk; fifo_out is valid the
// tick after fifo_r; l1b_w must come at least one tick after fifo_r.
// The board ID is taken from the switches at write time, not stored in
// the FIFOs (their 72 bits are taken by data and bunch number).
module daq_interface
  import prefred_pkg::*;
#(
  parameter int unsigned NBUF  = 4,
  parameter int unsigned DEPTH = 256
) (
  input  logic        clk,
  input  logic        fifo_rst,
  input  logic        fifo_w,
  input  logic        fifo_r,
  input  logic        vme_fifo_wen,
  input  logic [31:0] vme_wdata,
  input  dataout_t    dataout,
  input  logic [7:0]  bunch,
  input  logic [23:0] board_id,
  input  logic        l1b_w,
  input  logic [1:0]  l1ba,
  input  logic [1:0]  l2ba,
  input  logic [1:0]  l2w,
  output logic [31:0] rdata,
  output logic [7:0]  ff,
  output logic [7:0]  ef,
  output logic [30:0] l2_data
);
  logic [71:0] fifo_in, fifo_out;
  logic [10:0] prev_sumet;
  logic [31:0] buffers [NBUF][4];

  assign fifo_in = vme_fifo_wen ? {vme_wdata[7:0], vme_wdata, vme_wdata}
                                : {8'h00, bunch, dataout};

  for (genvar k = 0; k < 8; k++) begin : g_fifo
    l1_fifo #(.W(9), .DEPTH(DEPTH)) u_fifo (
      .clk, .rst(fifo_rst), .wr(fifo_w), .rd(fifo_r),
      .din(fifo_in[9*k +: 9]), .dout(fifo_out[9*k +: 9]),
      .full(ff[k]), .empty(ef[k]));
  end

  always_ff @(posedge clk) begin
    if (fifo_rst)    prev_sumet <= '0;
    else if (fifo_r) prev_sumet <= fifo_out[10:0];
    if (l1b_w) begin
      buffers[l1ba][0] <= {board_id, fifo_out[63:56]};
      buffers[l1ba][1] <= {8'h00, fifo_out[55:32]};
      buffers[l1ba][2] <= fifo_out[31:0];
      buffers[l1ba][3] <= {21'b0, prev_sumet};
    end
  end

  assign rdata   = buffers[l2ba][l2w];
  assign l2_data = fifo_out[30:0];
endmodule
