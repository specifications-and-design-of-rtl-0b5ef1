// tb_prefred_top: end-to-end test of the PreFRED board with its default
// parameters, driven through its pins only (VME bus, P2 trigger control,
// CRATESUM inputs), like a crate with a VME master, CDF clock/trigger
// control and twelve CRATESUMs.
//
// Sequence:
//  1. Load mode: module ID and version reads; the six phi-weighting LUTs
//     are loaded with 192 block transfers (BLT, 64 words each) and one
//     BLT is read back; thresholds written and read back; fake-E_t
//     dataout read-back; 256 VME pattern writes fill the L1 FIFOs (full
//     flags, error line), one entry is moved to a DAQ buffer with the
//     manual FIFO_R/L1B_W bits and read back, and the FIFO reset clears
//     everything.
//  2. Run mode, FRED delay 0: one event per crossing (random energies,
//     overflowing and saturated events included), B0 every 40 crossings,
//     an L1 accept or reject every crossing once the FIFO holds LAT
//     events. Checked: the FRED trigger bits every crossing, the L2 data
//     and L1BA while FP_str is high for every accept, refused writes in
//     run mode, HALT without and with RESET.
//  3. Back to load mode, FRED delay coarse 2 / fine 3, run again; then
//     all four DAQ buffers are read over VME in run mode and compared
//     with the last event accepted into each.
// The TOWTRG program runs all the time on its own inputs and is checked
// every crossing (summary and FRED output with coarse delay 1).
//
// Reference: sumet_ref_pkg (geometric phi weights). The stimulus follows
// the board's 22 ns phase count (dut.lphase / dut.tt_lphase, standing in
// for the CRATESUMs being timed to CS_132ns), and the FIFO contents model
// is advanced on the board's FIFO write strobe (dut.fifo_w); everything
// else is observed at the pins.
module tb_prefred_top;
  import prefred_pkg::*;
  import sumet_ref_pkg::*;

  localparam int NEV = 512;
  localparam int LAT = 8;                 // L1 decision latency in events
  localparam logic [4:0] SLOT = 5'd3;
  localparam logic [23:0] BOARD = 24'h5E0001;

  logic clk = 0, rst = 1, cdf_clk = 0;
  logic [31:2] vme_a = '0;
  logic [5:0] vme_am = 6'h09;
  logic [31:0] vme_wdata = '0, vme_rdata;
  logic n_as = 1, n_ds0 = 1, n_ds1 = 1, n_write = 1, n_lword = 0, n_iack = 1;
  logic [4:0] n_ga = ~SLOT;
  logic n_dtack, n_berr;
  logic n_halt = 1, n_reset = 1, n_b0 = 1, n_l1a = 1, n_l1r = 1;
  logic [1:0] n_l1ba = 2'b11;
  logic n_cdf_error;
  logic [119:0] csin = '0;
  logic [3:0] trigbit_fred;
  logic b0_fred, aux_enable, aux_spare;
  logic src_config = 0;
  logic [30:0] l2_data;
  logic [1:0] l2_l1ba;
  logic fp_str;
  logic [6:0] lights;
  logic [119:0] tt_csin = '0;
  logic [2:0] tt_cs_delay = 3'd0;
  logic [5:0] tt_fred_delay = 6'o12;     // coarse 1, fine 2
  logic [19:0] tt_summary, tt_fred;

  prefred_top dut (.*);

  always #1 clk = ~clk;                  // 22 ns tick
  always begin                           // CDF clock: 6 ticks per crossing
    #6 cdf_clk = 1;
    #6 cdf_clk = 0;
  end

  int checks = 0, failures = 0;
  int n_sat = 0, n_metovf = 0, n_etovf = 0, n_acc = 0, n_rej = 0, n_halt_ev = 0,
      n_reset_ev = 0, n_blt = 0, n_err = 0, n_refused = 0, n_fred = 0, n_l2 = 0,
      n_tt_sat = 0, n_fake = 0, n_b0_ev = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 60) $display("FAIL %s t=%0t", what, $time);
    end
  endtask

  // ---------------- reference events ----------------
  logic [9:0] ev [NEV][12][2];
  result_t    exp_r [NEV];
  logic [3:0] exp_t [NEV];
  logic [15:0] thr [4] = '{16'd300, 16'd900, 16'd2500, 16'd10000};

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

  // ---------------- VME master ----------------
  logic [31:0] xbuf [64];

  function automatic logic [31:0] vaddr(input logic [3:0] tgt, input logic [19:0] off);
    return {SLOT, 3'b000, tgt, off};
  endfunction

  // one VME cycle of `beats` longword transfers (BLT when beats > 1)
  task automatic vme_xfer(input logic [31:0] addr, input bit wr, input int beats,
                          output bit bus_err);
    bus_err = 0;
    @(negedge clk);
    vme_a = addr[31:2];
    vme_am = (beats > 1) ? 6'h0B : 6'h09;
    n_write = !wr; n_lword = 0;
    @(negedge clk);
    n_as = 0;
    @(negedge clk);
    for (int b = 0; b < beats; b++) begin
      int t;
      vme_wdata = xbuf[b];
      n_ds0 = 0; n_ds1 = 0;
      t = 0;
      while (n_dtack && n_berr && t < 200) begin @(negedge clk); t++; end
      if (t >= 200 || !n_berr) bus_err = 1;
      if (!wr) xbuf[b] = vme_rdata;
      n_ds0 = 1; n_ds1 = 1;
      t = 0;
      while ((!n_dtack || !n_berr) && t < 200) begin @(negedge clk); t++; end
      @(negedge clk);
    end
    n_as = 1;
    @(negedge clk);
    chk(!bus_err, "VME cycle acknowledged");
    if (beats > 1) n_blt++;
  endtask

  task automatic vwr(input logic [3:0] tgt, input logic [19:0] off, input logic [31:0] d);
    bit e;
    xbuf[0] = d;
    vme_xfer(vaddr(tgt, off), 1, 1, e);
  endtask

  task automatic vrd(input logic [3:0] tgt, input logic [19:0] off, output logic [31:0] d);
    bit e;
    vme_xfer(vaddr(tgt, off), 0, 1, e);
    d = xbuf[0];
  endtask

  task automatic wreg(input int w, input logic [7:0] v);
    vwr(TGT_CTRL, 20'(4 * w), {v, 24'h0});
  endtask

  function automatic logic [31:0] lut_pair_word(input int p, input int a);
    return {8'h00, lut_word(2*p+1, 12'(a))[11:0], lut_word(2*p, 12'(a))[11:0]};
  endfunction

  // ---------------- crossing stream ----------------
  int  c = -1;
  bit  fred_chk = 0;
  int  fred_coarse = 0;

  function automatic int ei(input int x);
    return ((x % NEV) + NEV) % NEV;
  endfunction

  always @(negedge clk) begin
    if (dut.lphase == 0) c++;
    if (c >= 0 && (dut.lphase == 0 || dut.lphase == 3))
      for (int s = 0; s < 12; s++)
        csin[10*s +: 10] = ev[ei(c)][s][dut.lphase == 3];
    // FRED trigger bits (fine delay <= 3, so settled by lphase 5)
    if (fred_chk && dut.lphase == 5) begin
      chk(trigbit_fred == exp_t[ei(c - 3 - fred_coarse)], "FRED trigger bits");
      n_fred++;
    end
  end

  // B0 once every 40 crossings
  always @(negedge clk)
    if (dut.lphase == 2) begin
      n_b0 = !(c >= 0 && c % 40 == 0);
      if (!n_b0) n_b0_ev++;
    end

  // ---------------- L1 FIFO model and L1 decisions ----------------
  int q [$];
  bit dec_en = 0;
  int prev_sumet = 0;
  logic [32:0] exp_l2q [$];                // {L1BA, L2 data} per accept
  logic [32:0] exp_l2 = '0;
  logic [31:0] exp_buf [4][4];
  bit          buf_valid [4] = '{0, 0, 0, 0};

  always @(posedge clk)
    if (dut.fifo_w && !dut.vme_fifo_wen) q.push_back(ei(c - 3));

  always @(negedge clk)
    if (dut.lphase == 2) begin
      n_l1a = 1; n_l1r = 1; n_l1ba = 2'b11;
      if (dec_en && q.size() >= LAT) begin
        int e;
        dataout_t d;
        logic [1:0] ba;
        e = q.pop_front();
        d = pack(exp_r[e], exp_t[e]);
        ba = 2'($urandom);
        if ($urandom_range(0, 2) == 0) begin
          n_l1a = 0; n_l1ba = ~ba; n_acc++;
          exp_l2q.push_back({ba, d[30:0]});
          exp_buf[ba][0] = {BOARD, 8'h00};
          exp_buf[ba][1] = {8'h00, d[55:32]};
          exp_buf[ba][2] = d[31:0];
          exp_buf[ba][3] = 32'(prev_sumet);
          buf_valid[ba] = 1;
        end else begin
          n_l1r = 0; n_rej++;
        end
        prev_sumet = int'(d.sumet);
      end
    end

  // L2 data on the front panel while FP_str is high
  logic fp_q = 0;
  always @(negedge clk) begin
    if (fp_str && lights[2]) begin
      if (!fp_q) begin
        n_l2++;
        chk(exp_l2q.size() > 0, "L2 strobe after an accept");
        if (exp_l2q.size() > 0) exp_l2 = exp_l2q.pop_front();
      end
      chk(l2_data == exp_l2[30:0], "L2 data");
      chk(l2_l1ba == exp_l2[32:31], "L2 buffer number");
    end
    fp_q = fp_str;
  end

  // ---------------- TOWTRG program ----------------
  logic [9:0] tf [12], ts [12];
  logic [19:0] tt_hist [$];
  int tt_go = 0;

  function automatic logic [19:0] tt_model();
    logic [19:0] e;
    e = '0;
    for (int j = 0; j < 3; j++) begin
      int t;
      t = 0;
      for (int i = 0; i < 12; i++) t += tf[i][2*j +: 2];
      if (t > 3) n_tt_sat++;
      e[2*j +: 2] = 2'(t > 3 ? 3 : t);
    end
    for (int i = 0; i < 12; i++) begin
      e[9:6] |= tf[i][9:6];
      e[19:10] |= ts[i];
    end
    return e;
  endfunction

  always @(negedge clk) begin
    if (tt_go > 10 && dut.tt_lphase == 2) begin
      chk(tt_summary == tt_hist[0], "TOWTRG summary");
      chk(tt_fred == tt_hist[2], "TOWTRG FRED output");
    end
    if (dut.tt_lphase == 0 && !rst) begin
      for (int i = 0; i < 12; i++) begin
        tf[i] = 10'($urandom);
        if ($urandom_range(0, 2) != 0) tf[i][5:0] = 6'($urandom) & 6'h15;
        if ($urandom_range(0, 2) != 0) tf[i][9:6] = 4'h0;
        ts[i] = ($urandom_range(0, 3) == 0) ? 10'(1 << $urandom_range(0, 9)) : 10'h0;
        tt_csin[10*i +: 10] = tf[i];
      end
    end
    if (dut.tt_lphase == 3 && !rst) begin
      for (int i = 0; i < 12; i++) tt_csin[10*i +: 10] = ts[i];
      tt_hist.push_front(tt_model());
      if (tt_hist.size() > 4) void'(tt_hist.pop_back());
      tt_go++;
    end
  end

  task automatic crossings(input int n);
    repeat (6 * n) @(negedge clk);
  endtask

  // ---------------- main sequence ----------------
  initial begin
    logic [31:0] d;
    string id;
    for (int e = 0; e < NEV; e++) begin
      int maxv;
      maxv = (e % 10 == 3) ? 1022 : (e % 10 == 7) ? 400 : (e % 2) ? 60 : 180;
      for (int s = 0; s < 12; s++)
        for (int j = 0; j < 2; j++) ev[e][s][j] = 10'($urandom_range(0, maxv));
      if (e % 25 == 11) ev[e][$urandom_range(0, 11)][$urandom_range(0, 1)] = 10'h3FF;
      if (e % 10 == 5) for (int j = 0; j < 2; j++) begin
        ev[e][0][j] = 10'd1000; ev[e][11][j] = 10'd1000; ev[e][1][j] = 10'd900;
      end
      exp_r[e] = sumet(ev[e]);
      exp_t[e] = trig_of(exp_r[e]);
      if (e % 25 == 11) n_sat++;
      if (exp_r[e].met_ovf) n_metovf++;
      if (exp_r[e].et_ovf) n_etovf++;
    end

    repeat (4) @(negedge clk);
    rst = 0;
    repeat (12) @(negedge clk);

    // ---- 1. load mode ----
    chk(lights[0] && !lights[2], "load mode after reset");
    id = "";
    for (int i = 0; i < 32; i++) begin
      vrd(TGT_ID, 20'(4 * i), d);
      id = {id, string'(d[31:24])};
    end
    chk(id == "PreFRED SUMET UChicago EDG board", "module ID");
    vrd(TGT_CTRL, 20'h20, d);
    chk(d[31:24] == 8'h01, "controller version / source");
    vrd(TGT_CTRL, 20'h24, d);
    chk(d[31:24] == 8'h01, "data processor version");
    wreg(1, 8'd0);                       // CS delay
    wreg(0, 8'd5);                       // B0 offset
    wreg(2, 8'd0);                       // FRED delay 0
    wreg(4, 8'h00);                      // no FIFO full masked

    // LUTs: 3 pairs x 4096 entries in 64-word block transfers
    for (int p = 0; p < 3; p++)
      for (int blk = 0; blk < 64; blk++) begin
        bit e;
        for (int w = 0; w < 64; w++) xbuf[w] = lut_pair_word(p, 64 * blk + w);
        vme_xfer(vaddr(TGT_LUT, 20'((p << 15) | (blk << 8))), 1, 64, e);
      end
    begin
      bit e;
      vme_xfer(vaddr(TGT_LUT, 20'((1 << 15) | (37 << 8))), 0, 64, e);
      for (int w = 0; w < 64; w++)
        chk(xbuf[w] == lut_pair_word(1, 64 * 37 + w), "LUT BLT read-back");
    end
    // thresholds
    vwr(TGT_THR, 20'h0, {thr[1], thr[0]});
    vwr(TGT_THR, 20'h4, {thr[3], thr[2]});
    vrd(TGT_THR, 20'h0, d); chk(d == {thr[1], thr[0]}, "threshold read-back 0/1");
    vrd(TGT_THR, 20'h4, d); chk(d == {thr[3], thr[2]}, "threshold read-back 2/3");

    // dataout read-back with fake E_t taken from the address
    for (int k = 0; k < 4; k++) begin
      logic [12:0] f;
      logic [25:0] f2;
      logic [9:0] fe [12][2];
      result_t r;
      dataout_t dd;
      f = 13'($urandom);
      f2 = {f, f};
      for (int s = 0; s < 12; s++) begin fe[s][0] = f2[s +: 10]; fe[s][1] = f2[s +: 10]; end
      r = sumet(fe);
      dd = pack(r, trig_of(r));
      vrd(TGT_DOUT, 20'({1'b1, f, 2'b00}), d);
      chk((d & 32'h7FFF_FFFF) == dd[31:0], "fake E_t dataout word 3");
      vrd(TGT_DOUT, 20'({1'b0, f, 2'b00}), d);
      chk((d & 32'hFFF0_FFFF) == {8'h00, dd[55:32]}, "fake E_t dataout word 2");
      n_fake++;
    end
    chk(trigbit_fred == 4'h0, "no FRED output in load mode");

    // fill the L1 FIFOs from VME: full flags and error line
    for (int i = 0; i < 256; i++) vwr(TGT_FIFO, 20'h0, 32'hA5000000 + i);
    vrd(TGT_CTRL, 20'h18, d); chk(d[31:24] == 8'hFF, "all FIFOs full");
    vrd(TGT_CTRL, 20'h1C, d); chk(d[31:24] == 8'h00, "no FIFO empty");
    crossings(2);
    chk(!n_cdf_error && lights[5], "FIFO full raises CDF error");
    if (!n_cdf_error) n_err++;
    wreg(3, 8'b0111_0000);               // L1BA 1, L1B_W, FIFO_R
    crossings(1);
    vrd(TGT_DAQ1, 20'h0, d); chk(d == {BOARD, 8'hA5}, "pattern buffer word 0");
    vrd(TGT_DAQ1, 20'h4, d); chk(d == 32'h0000_0000, "pattern buffer word 1");
    vrd(TGT_DAQ1, 20'h8, d); chk(d == 32'hA5000000, "pattern buffer word 2");
    wreg(3, 8'h02);                      // FIFO reset
    wreg(3, 8'h00);
    vrd(TGT_CTRL, 20'h1C, d); chk(d[31:24] == 8'hFF, "FIFOs empty after reset");
    chk(n_cdf_error, "error cleared by FIFO reset");
    n_reset_ev++;

    // ---- 2. run mode, FRED delay 0 ----
    wreg(3, 8'h01);
    chk(lights[2] && !lights[0], "run light");
    crossings(6);
    fred_coarse = 0; fred_chk = 1;
    dec_en = 1;
    crossings(150);
    // refused accesses in run mode
    vwr(TGT_THR, 20'h0, 32'h0);
    vwr(TGT_LUT, 20'h0, 32'h0);
    wreg(2, 8'd7);
    vrd(TGT_THR, 20'h0, d); chk(d == {thr[1], thr[0]}, "threshold write refused in run");
    vrd(TGT_CTRL, 20'h8, d); chk(d[31:24] == 8'd0, "register write refused in run");
    vrd(TGT_LUT, 20'h0, d); chk(d == 32'h0, "LUT read refused in run");
    n_refused += 4;
    crossings(60);
    // HALT without RESET: FIFO contents are kept
    dec_en = 0; crossings(2);
    n_halt = 0; n_halt_ev++;
    crossings(6);
    chk(lights[4], "halt light");
    n_halt = 1;
    crossings(2);
    dec_en = 1;
    crossings(100);
    // HALT with RESET: FIFOs cleared, writing restarts at B0
    dec_en = 0; crossings(2);
    n_halt = 0; n_halt_ev++;
    crossings(3);
    n_reset = 0; crossings(2); n_reset = 1;
    q.delete(); prev_sumet = 0; n_reset_ev++;
    vrd(TGT_CTRL, 20'h1C, d); chk(d[31:24] == 8'hFF, "FIFOs empty after RESET");
    crossings(2);
    n_halt = 1;
    dec_en = 1;
    crossings(150);

    // ---- 3. FRED delay coarse 2 / fine 3 ----
    dec_en = 0; crossings(2);
    fred_chk = 0;
    wreg(3, 8'h00);
    chk(trigbit_fred == 4'h0, "FRED output off in load mode");
    wreg(2, 8'o23);
    wreg(3, 8'h01);
    crossings(6);
    fred_coarse = 2; fred_chk = 1;
    dec_en = 1;
    crossings(150);
    dec_en = 0; crossings(3);
    // DAQ buffers over VME in run mode
    for (int b = 0; b < 4; b++)
      if (buf_valid[b])
        for (int w = 0; w < 4; w++) begin
          logic [31:0] m;
          m = (w == 0) ? 32'hFFFF_FF00 : (w == 1) ? 32'hFFF0_FFFF :
              (w == 2) ? 32'h7FFF_FFFF : 32'hFFFF_FFFF;
          vrd(4'(8 + b), 20'(4 * w), d);
          chk((d & m) == (exp_buf[b][w] & m), $sformatf("DAQ buffer %0d word %0d", b, w));
        end
    fred_chk = 0;
    wreg(3, 8'h00);

    $display("events=%0d saturated=%0d met_overflow=%0d et_overflow=%0d",
             NEV, n_sat, n_metovf, n_etovf);
    $display("l1a=%0d l1r=%0d l2_strobes=%0d halts=%0d fifo_resets=%0d b0=%0d blt=%0d",
             n_acc, n_rej, n_l2, n_halt_ev, n_reset_ev, n_b0_ev, n_blt);
    $display("error_flag=%0d refused=%0d fred_checks=%0d fake_et=%0d towtrg_sat=%0d",
             n_err, n_refused, n_fred, n_fake, n_tt_sat);
    chk(n_acc > 0 && n_rej > 0 && n_l2 == n_acc, "every L1 accept gave one L2 strobe");
    chk(n_sat > 0 && n_metovf > 0 && n_etovf > 0 && n_tt_sat > 0, "mechanisms exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
