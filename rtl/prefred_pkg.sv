// prefred_pkg: types and constants shared by the PreFRED board RTL.
//
// The board is clocked by one 22 ns clock: six ticks make one 132 ns CDF
// crossing. A CRATESUM sends the even wedge of its sector during the first
// 66 ns (ticks 0-2 after CS_132ns) and the odd wedge during the second
// (ticks 3-5). The SUMET arithmetic formats (widths, least counts, full
// scales) follow the specification; the tick-based clocking is this
// design's way of expressing the board's 22 ns spaced clock phases.
package prefred_pkg;

  localparam int unsigned N_CS      = 12;  // CRATESUM boards (sectors)
  localparam int unsigned ET_W      = 10;  // wedge E_t word, 0.5 GeV LSB
  localparam int unsigned N_LUT     = 6;   // phi-weighting SRAMs
  localparam int unsigned PS_W      = 12;  // signed partial sum, 0.5 GeV LSB
  localparam int unsigned LUT_AW    = 14;  // 16K x 16 SRAM
  localparam int unsigned LUT_DW    = 16;
  localparam int unsigned TICKS     = 6;   // 22 ns ticks per 132 ns crossing

  typedef logic [ET_W-1:0]          et_t;
  typedef logic signed [PS_W-1:0]   ps_t;
  typedef logic [LUT_AW-1:0]        lut_addr_t;
  typedef logic [LUT_DW-1:0]        lut_data_t;

  // VME address map, decoded on A[23:20] of the local address.
  typedef enum logic [3:0] {
    TGT_CTRL  = 4'h0,  // control registers 0x000000-0x000024
    TGT_ID    = 4'h1,  // module ID 0x100000-0x10007C
    TGT_LUT   = 4'h4,  // phi-weighting LUTs 0x400000-0x417FFC
    TGT_THR   = 4'h5,  // trigger thresholds 0x500000-0x500004
    TGT_DOUT  = 4'h6,  // dataout read-back 0x600000-0x60FFFC
    TGT_FIFO  = 4'h7,  // L1 FIFO write 0x700000-0x7003FC
    TGT_DAQ0  = 4'h8,  // DAQ buffers 0..3 at 0x800000..0xB00000
    TGT_DAQ1  = 4'h9,
    TGT_DAQ2  = 4'hA,
    TGT_DAQ3  = 4'hB
  } vme_target_e;

  // Output words of the SUMET Data Processor (Table of DAQ/L2 formats).
  typedef struct packed {
    logic [1:0]  met_trig;    // 2nd DAQ word [23:22]
    logic [1:0]  et_trig;     // [21:20]
    logic [3:0]  fred_trig;   // [19:16] FRED-delayed trigger bits
    logic [15:0] metsq;       // [15:0]  missing E_t squared, 1 GeV^2
    logic        fred_b0;     // 3rd DAQ word [31]
    logic [9:0]  sumey;       // [30:21] sign + 9-bit magnitude, 0.5 GeV
    logic [9:0]  sumex;       // [20:11]
    logic [10:0] sumet;       // [10:0]  1 GeV
  } dataout_t;                // 56 bits

  // Signed partial sum times weight, as stored in a phi LUT:
  // bit 11 sign, bits 10:0 magnitude in 0.25 GeV, magnitude 2047 = saturated.
  function automatic logic signed [13:0] lut_to_signed(input lut_data_t d);
    logic signed [13:0] m;
    m = 14'(d[10:0]);
    return d[11] ? -m : m;
  endfunction

endpackage
