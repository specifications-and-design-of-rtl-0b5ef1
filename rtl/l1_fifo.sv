// l1_fifo: one L1 FIFO chip, 256 words of 9 bits.
//
// Eight of these side by side hold the Data Processor output of every
// crossing until the trigger supervisor sends L1 accept or reject for it.
// A word is written at the clk edge while `wr` is high and the FIFO is not
// full; `rd` pops the oldest word into the output register `dout` (valid
// from the next tick until the next read) when the FIFO is not empty.
// `rst` (the board's FIFO reset) empties it. full/empty are active high.
// Depth and width follow the specification; the synchronous interface
// stands in for the asynchronous FIFO chips of the board.
module l1_fifo #(
  parameter int unsigned W     = 9,
  parameter int unsigned DEPTH = 256
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         wr,
  input  logic         rd,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout,
  output logic         full,
  output logic         empty
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wptr, rptr;

  assign empty = (wptr == rptr);
  assign full  = (wptr[AW] != rptr[AW]) && (wptr[AW-1:0] == rptr[AW-1:0]);

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr <= '0;
      rptr <= '0;
      dout <= '0;
    end else begin
      if (wr && !full) begin
        mem[wptr[AW-1:0]] <= din;
        wptr <= wptr + 1'b1;
      end
      if (rd && !empty) begin
        dout <= mem[rptr[AW-1:0]];
        rptr <= rptr + 1'b1;
      end
    end
  end
endmodule
