// sumet_data_processor: the SUMET Data Processor FPGA.
//
// Computes, for every 132 ns crossing, the scalar sum SumEt of the 24
// calorimeter wedge energies, the vector sums SumEx and SumEy, the missing
// E_t squared (SumEx^2 + SumEy^2), and four threshold trigger bits, then
// delays the trigger bits (with the B0 tag) to align them for FRED.
// The cos/sin weighting itself happens outside the FPGA, in six SRAM
// look-up tables; this module drives their address buses and reads their
// data buses.
//
// Data path (tick = 22 ns, lphase counted from CS_132ns, crossing n):
//   lphase 0, n   : input register <- even wedges  (clk_66ns)
//   lphase 3, n   : partial sums of even wedges; input <- odd wedges
//   lphase 0, n+1 : sumodd <- LUT(even);   partial sums of odd wedges
//   lphase 3, n+1 : sumodd <- LUT(odd), sumeven <- LUT(even)
//   lphase 0, n+2 : SumEx, SumEy, SumEt registered with overflow flags
//   lphase 1, n+2 : squares read;  lphase 2: MET^2 registered
//   lphase 5, n+2 : output register (dataout) and trigger bits
// i.e. 2 crossings + 5 ticks after the even input register, within the
// three-crossing latency budget. The trigger bits then enter the FRED
// alignment pipeline at lphase 0 of crossing n+3.
//
// Saturation: an input word with all bits set saturates every output word
// (all ones, sign bits included) and sets all four trigger bits; an
// overflow in the SumEt chain saturates SumEt, and one in SumEx, SumEy or
// MET^2 saturates that word and MET^2.
//
// VME side (load mode): src_etin replaces the CRATESUM input by twelve fake
// words built from VME_Address[14:2] (word i = bits i..i+9 of that 13-bit
// field repeated twice; the bit combination is this design's choice);
// vme_lut_en selects a LUT pair whose address comes from VME_Address[13:2]
// and whose data map D[11:0] (even LUT) and D[23:12] (odd LUT); thresholds,
// dataout words and the program version can be read back on vme_rdata.
//
// dataout[55:32] is DAQ word 2 bits 23:0 and dataout[31:0] is DAQ word 3.
// Some SRAM-side outputs are fixed by construction: the LUT write data is
// the VME data word passed straight through (bits 15:12 are 0), and
// LUT address bit 12 is 0 because the 12-bit partial sum uses bits 11:0.
module sumet_data_processor
  import prefred_pkg::*;
#(
  parameter int unsigned NUM_MET_THR  = 2,
  parameter logic [7:0]  PROC_VERSION = 8'h01
) (
  input  logic        clk,
  input  logic        rst,
  // timing grid
  input  logic [2:0]  lphase,
  input  logic        ce_66,
  input  logic        ce_cs132,
  input  logic        even,
  // CRATESUM input (word i at bits 10i+9:10i)
  input  logic [119:0] csin,
  // control bus
  input  logic        src_etin,
  input  logic [26:2] vme_address,
  input  logic [31:0] vme_wdata,
  input  logic        vme_write,
  input  logic [2:0]  vme_lut_en,
  input  logic [2:0]  n_lut_write,
  input  logic        lut_add_msb,
  input  logic        thres_sel,
  input  logic        thr_we,
  input  logic        thr_ren,
  input  logic [1:0]  dataout_ren,
  input  logic        vme_version_ren,
  input  logic [5:0]  fred_delay,
  input  logic        b0_delayed,
  output logic [31:0] vme_rdata,
  // phi-weighting SRAMs
  output lut_addr_t   lut_addr  [N_LUT],
  output lut_data_t   lut_wdata [N_LUT],
  output logic        lut_we    [N_LUT],
  input  lut_data_t   lut_rdata [N_LUT],
  // results
  output dataout_t    dataout,
  output logic [3:0]  trigbits,
  output logic [3:0]  tofred,
  output logic        b0_fred
);
  et_t           datain [N_CS];
  et_t           etin_q [N_CS];
  logic          etin_even;
  ps_t           ps [6];
  logic [ET_W:0] et_pair [6];
  logic          sat, ps_even;
  logic          sat_q1, sat_q2, sat_c;
  logic          ex_sign, ey_sign, ex_ovf, ey_ovf;
  logic [8:0]    ex_mag, ey_mag;
  logic [10:0]   sumet_raw;
  logic          et_ovf_raw;
  logic          ex_sat, ey_sat, et_sat;
  logic [10:0]   sumet_s;
  logic [9:0]    sumex_s, sumey_s;
  logic [15:0]   metsq;
  logic          met_ovf;
  logic [3:0]    trig_d;
  logic [31:0]   thr_rdata;
  logic [4:0]    fred_q;
  logic [25:0]   fake2;

  // ---- input selection and input register (clk_66ns) ----
  assign fake2 = {vme_address[14:2], vme_address[14:2]};
  always_comb
    for (int i = 0; i < N_CS; i++)
      datain[i] = src_etin ? fake2[i +: ET_W] : csin[ET_W*i +: ET_W];

  always_ff @(posedge clk)
    if (ce_66) begin
      etin_q    <= datain;
      etin_even <= even;
    end

  // ---- first adder stage and LUT address path ----
  sumet_adder_a u_adder_a (
    .clk, .ce(ce_66), .even_in(etin_even), .etin(etin_q),
    .ps, .et_pair, .sat, .ps_even);

  lut_addr_mux u_mux (
    .ps, .ps_even, .vme_sel(|vme_lut_en), .vme_addr(vme_address[13:2]),
    .lut_add_msb, .lut_addr);

  always_comb
    for (int k = 0; k < N_LUT; k++) begin
      lut_we[k]    = ~n_lut_write[k/2];
      lut_wdata[k] = (k % 2 == 0) ? {4'h0, vme_wdata[11:0]} : {4'h0, vme_wdata[23:12]};
    end

  // ---- weighted sums, SumEt, saturation flags ----
  sumet_xy_sum u_xy (
    .clk, .ce66(ce_66), .ce_out(ce_cs132), .lut_data(lut_rdata),
    .ex_sign, .ex_mag, .ex_ovf, .ey_sign, .ey_mag, .ey_ovf);

  sumet_et_sum u_et (
    .clk, .ce66(ce_66), .ce_out(ce_cs132), .et_pair,
    .sumet(sumet_raw), .ovf(et_ovf_raw));

  always_ff @(posedge clk) begin
    if (ce_66) begin
      sat_q1 <= sat;
      sat_q2 <= sat_q1;
    end
    if (ce_cs132) sat_c <= sat_q1 | sat_q2;
  end

  always_comb begin
    ex_sat  = ex_ovf | sat_c;
    ey_sat  = ey_ovf | sat_c;
    et_sat  = et_ovf_raw | sat_c;
    sumet_s = et_sat ? 11'h7FF : sumet_raw;
    sumex_s = ex_sat ? 10'h3FF : {ex_sign, ex_mag};
    sumey_s = ey_sat ? 10'h3FF : {ey_sign, ey_mag};
  end

  met_square u_met (
    .clk, .ce_sq(lphase == 3'd1), .ce_add(lphase == 3'd2),
    .ex_mag(ex_mag | {9{ex_sat}}), .ey_mag(ey_mag | {9{ey_sat}}),
    .ovf_in(ex_sat | ey_sat), .metsq, .ovf(met_ovf));

  threshold_compare #(.NUM_MET_THR(NUM_MET_THR)) u_thr (
    .clk, .rst, .thr_we, .thr_sel(thres_sel), .wdata(vme_wdata), .rdata(thr_rdata),
    .sumet(sumet_s), .et_ovf(et_sat), .metsq, .met_ovf, .trig(trig_d));

  // ---- output register (inverted clk_132ns2, lphase 5) ----
  always_ff @(posedge clk)
    if (lphase == 3'd5) begin
      dataout.sumet     <= sumet_s;
      dataout.sumex     <= sumex_s;
      dataout.sumey     <= sumey_s;
      dataout.metsq     <= metsq;
      dataout.et_trig   <= trig_d[1:0];
      dataout.met_trig  <= trig_d[3:2];
      dataout.fred_trig <= fred_q[3:0];
      dataout.fred_b0   <= fred_q[4];
      trigbits          <= trig_d;
    end

  // ---- FRED alignment pipeline ----
  fred_pipeline #(.W(5)) u_fred (
    .clk, .ce_cs132, .lphase, .fred_delay,
    .din({b0_delayed, trigbits}), .dout(fred_q));

  assign tofred  = fred_q[3:0];
  assign b0_fred = fred_q[4];

  // ---- VME read-back ----
  always_comb begin
    logic [1:0] pair;
    pair = vme_lut_en[2] ? 2'd2 : vme_lut_en[1] ? 2'd1 : 2'd0;
    vme_rdata = '0;
    if (thr_ren)
      vme_rdata = thr_rdata;
    else if (|vme_lut_en && !vme_write)
      vme_rdata = {8'h00, lut_rdata[2*pair+1][11:0], lut_rdata[2*pair][11:0]};
    else if (dataout_ren[0])
      vme_rdata = {8'h00, dataout[55:32]};
    else if (dataout_ren[1])
      vme_rdata = dataout[31:0];
    else if (vme_version_ren)
      vme_rdata = {PROC_VERSION, 24'h0};
  end
endmodule
