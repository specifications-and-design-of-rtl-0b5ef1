// prefred_top: the PreFRED board of the Level 1 calorimeter trigger.
//
// One printed circuit board serves two PreFRED modules, each feeding the
// global L1 decision (FRED) every 132 ns crossing:
//  * SUMET sums the transverse energy of the 24 calorimeter wedges into
//    SumEt, SumEx, SumEy and missing-E_t^2, applies four programmable
//    thresholds, sends the trigger bits to FRED, and keeps the results in
//    L1 FIFOs and DAQ buffers for Level 2 and data acquisition.
//  * TOWTRG condenses the twelve 20-bit tower-trigger summaries into one.
// The SUMET board is built here completely: VME interface, Controller,
// clock generator, SUMET Data Processor with its six phi-weighting SRAMs,
// and the DAQ interface. The TOWTRG program stands beside it with its own
// ports (input, CS phase and FRED delay), without a second copy of the
// VME/Controller/DAQ side.
//
// Clocking: `clk` is a 22 ns clock phase-locked to CDF_clk (six ticks per
// crossing); the board's 66 ns and phase-shifted 132 ns clocks become
// clock enables derived by clock_gen. The VME data bus is split into
// vme_wdata (master to board) and vme_rdata (board to master); VME
// strobes are sampled by clk. csin[10i+9:10i] is CRATESUM i; the even
// wedges are sent in the first 66 ns of a crossing, the odd ones in the
// second. trigbit_fred/b0_fred are driven only when the backplane output
// is enabled (always in run mode).
module prefred_top
  import prefred_pkg::*;
#(
  parameter int unsigned NUM_MET_THR = 2,
  parameter logic [23:0] BOARD_ID    = 24'h5E0001
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         cdf_clk,
  // VME (P1)
  input  logic [31:2]  vme_a,
  input  logic [5:0]   vme_am,
  input  logic [31:0]  vme_wdata,
  output logic [31:0]  vme_rdata,
  input  logic         n_as,
  input  logic         n_ds0,
  input  logic         n_ds1,
  input  logic         n_write,
  input  logic         n_lword,
  input  logic         n_iack,
  input  logic [4:0]   n_ga,
  output logic         n_dtack,
  output logic         n_berr,
  // CDF trigger control (P2)
  input  logic         n_halt,
  input  logic         n_reset,
  input  logic         n_b0,
  input  logic         n_l1a,
  input  logic         n_l1r,
  input  logic [1:0]   n_l1ba,
  output logic         n_cdf_error,
  // CRATESUM input and FRED output (P3)
  input  logic [119:0] csin,
  output logic [3:0]   trigbit_fred,
  output logic         b0_fred,
  output logic         aux_enable,
  output logic         aux_spare,
  // front panel
  input  logic         src_config,
  output logic [30:0]  l2_data,
  output logic [1:0]   l2_l1ba,
  output logic         fp_str,
  output logic [6:0]   lights,
  // TOWTRG program
  input  logic [119:0] tt_csin,
  input  logic [2:0]   tt_cs_delay,
  input  logic [5:0]   tt_fred_delay,
  output logic [19:0]  tt_summary,
  output logic [19:0]  tt_fred
);
  // clock grid
  logic [2:0] phase, lphase;
  logic       ce_cdf, ce_cs132, ce_66, even;
  // VME interface <-> controller
  logic        n_modsel, n_vme_data_str, vme_write, n_ack, n_vme_error;
  logic [26:2] vme_address;
  // control bus
  logic        run, lut_add_msb, fifo_rst, thr_we, thres_sel, thr_ren;
  logic [2:0]  vme_lut_en, n_lut_write;
  logic [1:0]  dataout_ren, l1ba, l2ba, l2w;
  logic        vme_version_ren, src_etin, fifo_w, fifo_r, vme_fifo_wen, l1b_w;
  logic        n_bp_trigbits_en, b0_delayed;
  logic [5:0]  fred_delay;
  logic [2:0]  cs_delay;
  logic [7:0]  bunch, ff, ef;
  logic [23:0] board_id;
  logic [31:0] proc_rdata, daq_rdata;
  // data processor
  lut_addr_t   lut_addr  [N_LUT];
  lut_data_t   lut_wdata [N_LUT];
  lut_data_t   lut_rdata [N_LUT];
  logic        lut_we    [N_LUT];
  dataout_t    dataout;
  logic [3:0]  trigbits, tofred;
  logic        b0_tofred;

  clock_gen u_clock_gen (
    .clk, .rst, .cdf_clk, .cs_delay, .phase, .lphase,
    .ce_cdf, .ce_cs132, .ce_66, .even);

  vme_interface u_vme (
    .clk, .rst, .a(vme_a), .am(vme_am), .n_as, .n_ds0, .n_ds1, .n_write,
    .n_lword, .n_iack, .n_ga, .n_ack, .n_vme_error, .n_modsel,
    .n_vme_data_str, .vme_write, .vme_address, .n_dtack, .n_berr);

  controller #(.BOARD_ID(BOARD_ID)) u_ctrl (
    .clk, .rst, .ce_cdf, .ce_cs132,
    .vme_address, .n_modsel, .n_vme_data_str, .vme_write, .vme_wdata,
    .vme_rdata, .n_ack, .n_vme_error, .proc_rdata, .daq_rdata,
    .n_halt, .n_reset, .n_b0, .n_l1a, .n_l1r, .n_l1ba, .n_cdf_error,
    .ff, .ef, .src_config,
    .run, .lut_add_msb, .fifo_rst, .thr_we, .thres_sel, .thr_ren,
    .vme_lut_en, .n_lut_write, .dataout_ren, .vme_version_ren, .src_etin,
    .fifo_w, .fifo_r, .vme_fifo_wen, .l1b_w, .l1ba, .l2ba, .l2w, .fp_str,
    .n_bp_trigbits_en, .aux_enable, .aux_spare, .fred_delay, .cs_delay,
    .bunch, .b0_delayed, .board_id, .lights);

  sumet_data_processor #(.NUM_MET_THR(NUM_MET_THR)) u_proc (
    .clk, .rst, .lphase, .ce_66, .ce_cs132, .even, .csin,
    .src_etin, .vme_address, .vme_wdata, .vme_write, .vme_lut_en,
    .n_lut_write, .lut_add_msb, .thres_sel, .thr_we, .thr_ren,
    .dataout_ren, .vme_version_ren, .fred_delay, .b0_delayed,
    .vme_rdata(proc_rdata), .lut_addr, .lut_wdata, .lut_we, .lut_rdata,
    .dataout, .trigbits, .tofred, .b0_fred(b0_tofred));

  for (genvar k = 0; k < N_LUT; k++) begin : g_lut
    phi_lut_sram #(.AW(LUT_AW), .DW(LUT_DW)) u_sram (
      .clk, .addr(lut_addr[k]), .we(lut_we[k]), .din(lut_wdata[k]),
      .dout(lut_rdata[k]));
  end

  daq_interface u_daq (
    .clk, .fifo_rst, .fifo_w, .fifo_r, .vme_fifo_wen, .vme_wdata,
    .dataout, .bunch, .board_id, .l1b_w, .l1ba, .l2ba, .l2w,
    .rdata(daq_rdata), .ff, .ef, .l2_data);

  assign trigbit_fred = n_bp_trigbits_en ? 4'h0 : tofred;
  assign b0_fred      = n_bp_trigbits_en ? 1'b0 : b0_tofred;
  assign l2_l1ba      = l1ba;

  // ---- TOWTRG program ----
  logic [2:0] tt_phase, tt_lphase;
  logic       tt_ce_cdf, tt_ce_cs132, tt_ce_66, tt_even;

  clock_gen u_tt_clock_gen (
    .clk, .rst, .cdf_clk, .cs_delay(tt_cs_delay), .phase(tt_phase),
    .lphase(tt_lphase), .ce_cdf(tt_ce_cdf), .ce_cs132(tt_ce_cs132),
    .ce_66(tt_ce_66), .even(tt_even));

  towtrg_data_processor u_towtrg (
    .clk, .lphase(tt_lphase), .ce_66(tt_ce_66), .ce_cs132(tt_ce_cs132),
    .even(tt_even), .csin(tt_csin), .fred_delay(tt_fred_delay),
    .summary(tt_summary), .tofred(tt_fred));
endmodule
