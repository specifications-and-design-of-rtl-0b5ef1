// tb_sumet_data_processor: end-to-end check of the SUMET Data Processor
// with its six phi-weighting SRAMs.
// The SRAMs and thresholds are loaded through the processor's VME ports.
// Then one event per crossing is streamed in (even wedges in the first
// half, odd wedges in the second) with random energies, including large
// ones that overflow SumEx/SumEy/MET^2 or SumEt and saturated input words.
// Every tick, dataout must equal the reference result of the event three
// crossings earlier (this pins the latency to 2 crossings + 5 ticks), and
// the FRED output (fred_delay = 0) must carry that event's trigger bits
// from lphase 2. Finally the VME read-back paths are exercised: thresholds,
// LUT data, both dataout words and the fake-E_t input built from the
// address.
module tb_sumet_data_processor;
  import prefred_pkg::*;
  import sumet_ref_pkg::*;

  localparam int NEV = 400;

  logic clk = 0, rst = 1;
  logic [2:0] lphase = 0;
  logic ce_66, ce_cs132, even;
  logic [119:0] csin = '0;
  logic src_etin = 0;
  logic [26:2] vme_address = '0;
  logic [31:0] vme_wdata = '0;
  logic vme_write = 0;
  logic [2:0] vme_lut_en = '0, n_lut_write = '1;
  logic lut_add_msb = 0, thres_sel = 0, thr_we = 0, thr_ren = 0;
  logic [1:0] dataout_ren = '0;
  logic vme_version_ren = 0;
  logic [5:0] fred_delay = '0;
  logic b0_delayed = 0;
  logic [31:0] vme_rdata;
  lut_addr_t lut_addr [N_LUT];
  lut_data_t lut_wdata [N_LUT], lut_rdata [N_LUT];
  logic lut_we [N_LUT];
  dataout_t dataout;
  logic [3:0] trigbits, tofred;
  logic b0_fred;

  int checks = 0, failures = 0;
  int n_sat = 0, n_xyovf = 0, n_etovf = 0, n_trig = 0;
  logic [15:0] thr [4] = '{16'd300, 16'd900, 16'd2500, 16'd10000};

  assign ce_66    = (lphase == 0) || (lphase == 3);
  assign ce_cs132 = (lphase == 0);
  assign even     = (lphase < 3);

  sumet_data_processor dut (.*);

  for (genvar k = 0; k < N_LUT; k++) begin : g_lut
    phi_lut_sram u_sram (.clk, .addr(lut_addr[k]), .we(lut_we[k]),
                         .din(lut_wdata[k]), .dout(lut_rdata[k]));
  end

  always #1 clk = ~clk;
  always @(posedge clk) lphase <= (lphase == 5) ? 3'd0 : lphase + 3'd1;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s t=%0t", what, $time);
    end
  endtask

  logic [9:0] ev [NEV][12][2];
  result_t    exp_r [NEV];
  logic [3:0] exp_t [NEV];

  function automatic logic [3:0] trig_of(input result_t r);
    logic [3:0] t;
    t[0] = r.et_ovf  || (r.sumet > thr[0][10:0]);
    t[1] = r.et_ovf  || (r.sumet > thr[1][10:0]);
    t[2] = r.met_ovf || (r.metsq > thr[2]);
    t[3] = r.met_ovf || (r.metsq > thr[3]);
    return t;
  endfunction

  function automatic dataout_t pack(input result_t r, input logic [3:0] t);
    dataout_t d;
    d = '0;
    d.sumet = r.sumet; d.sumex = r.sumex; d.sumey = r.sumey;
    d.metsq = r.metsq; d.et_trig = t[1:0]; d.met_trig = t[3:2];
    return d;
  endfunction

  // dataout without the FRED diagnostic fields
  function automatic dataout_t core(input dataout_t d);
    d.fred_trig = '0; d.fred_b0 = 1'b0;
    return d;
  endfunction

  initial begin
    int c;
    // ---- build events ----
    for (int e = 0; e < NEV; e++) begin
      int maxv;
      maxv = (e % 10 == 3) ? 1022 : (e % 10 == 7) ? 400 : (e % 2) ? 60 : 180;
      for (int s = 0; s < 12; s++)
        for (int j = 0; j < 2; j++) ev[e][s][j] = 10'($urandom_range(0, maxv));
      if (e % 25 == 11) ev[e][$urandom_range(0, 11)][$urandom_range(0, 1)] = 10'h3FF;
      if (e % 10 == 5) for (int j = 0; j < 2; j++) begin   // strongly one-sided
        ev[e][0][j] = 10'd1000; ev[e][11][j] = 10'd1000; ev[e][1][j] = 10'd900;
      end
      exp_r[e] = sumet(ev[e]);
      exp_t[e] = trig_of(exp_r[e]);
      if (e % 25 == 11) n_sat++;
      if (exp_r[e].met_ovf) n_xyovf++;
      if (exp_r[e].et_ovf) n_etovf++;
      if (|exp_t[e]) n_trig++;
    end

    repeat (3) @(posedge clk);
    rst = 0;
    // ---- load the LUTs through the VME port ----
    vme_write = 1;
    for (int p = 0; p < 3; p++)
      for (int a = 0; a < 4096; a++) begin
        @(negedge clk);
        vme_lut_en = 3'(1 << p);
        vme_address = '0;
        vme_address[13:2] = 12'(a);
        vme_address[16:15] = 2'(p);
        vme_wdata = {8'h00, lut_word(2*p+1, 12'(a))[11:0], lut_word(2*p, 12'(a))[11:0]};
        n_lut_write = ~(3'(1 << p));
      end
    @(negedge clk);
    n_lut_write = '1;
    vme_lut_en = '0;
    // ---- thresholds ----
    for (int p = 0; p < 2; p++) begin
      @(negedge clk);
      thres_sel = p[0]; vme_wdata = {thr[2*p+1], thr[2*p]}; thr_we = 1;
    end
    @(negedge clk);
    thr_we = 0; vme_write = 0;

    // ---- stream events, one per crossing ----
    while (lphase != 5) @(negedge clk);
    c = -1;
    for (int t = 0; t < 6 * (NEV + 4); t++) begin
      @(negedge clk);
      if (lphase == 0) c++;
      // drive the half-crossing data
      if (lphase == 0 || lphase == 3) begin
        for (int s = 0; s < 12; s++)
          csin[10*s +: 10] = (c >= 0 && c < NEV) ? ev[c][s][lphase == 3] : 10'd0;
      end
      // every tick of crossing c, dataout is the result of event c-3
      if (c >= 3 && c - 3 < NEV) begin
        chk(core(dataout) == pack(exp_r[c-3], exp_t[c-3]), "dataout");
        if (core(dataout) != pack(exp_r[c-3], exp_t[c-3]) && lphase == 0)
          $display("ev %0d got %h exp %h", c-3, core(dataout), pack(exp_r[c-3], exp_t[c-3]));
        if (lphase >= 2) chk(tofred == exp_t[c-3], "tofred");
        if (lphase >= 1) chk(trigbits == exp_t[c-3], "trigbits");
      end
    end

    // ---- VME read-back ----
    @(negedge clk);
    thr_ren = 1; thres_sel = 1;
    #0.5 chk(vme_rdata == {thr[3], thr[2]}, "threshold readback");
    @(negedge clk);
    thr_ren = 0;
    vme_lut_en = 3'b010; vme_address = '0; vme_address[13:2] = 12'h7F0; vme_address[16:15] = 2'd1;
    #0.5 chk(vme_rdata == {8'h00, lut_word(3, 12'h7F0)[11:0], lut_word(2, 12'h7F0)[11:0]}, "lut readback");
    @(negedge clk);
    vme_lut_en = '0;
    // fake E_t from the address: field f = A[14:2], word i = {f,f}[i+9:i]
    begin
      logic [12:0] f;
      logic [25:0] ff2;
      logic [9:0] fe [12][2];
      result_t r;
      f = 13'h0A5C;
      ff2 = {f, f};
      for (int s = 0; s < 12; s++) begin fe[s][0] = ff2[s +: 10]; fe[s][1] = ff2[s +: 10]; end
      r = sumet(fe);
      src_etin = 1; vme_address = '0; vme_address[14:2] = f; vme_address[15] = 1;
      dataout_ren = 2'b10;
      repeat (30) @(negedge clk);
      chk(vme_rdata == pack(r, trig_of(r))[31:0] || vme_rdata == {1'b1, pack(r, trig_of(r))[30:0]}, "dataout word 3 readback");
      dataout_ren = 2'b01;
      #0.5 chk(vme_rdata[15:0] == r.metsq && vme_rdata[23:20] == trig_of(r), "dataout word 2 readback");
      dataout_ren = 2'b00; src_etin = 0;
      vme_version_ren = 1;
      #0.5 chk(vme_rdata[30:28] == 3'd0, "version type SUMET");
      vme_version_ren = 0;
    end

    $display("events=%0d saturated_inputs=%0d met_overflows=%0d et_overflows=%0d triggered=%0d",
             NEV, n_sat, n_xyovf, n_etovf, n_trig);
    chk(n_sat > 0 && n_xyovf > 0 && n_etovf > 0, "mechanisms exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
