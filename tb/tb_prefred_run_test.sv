// tb_prefred_run_test: the bench procedure for commissioning a SUMET board
// with a test card, run on the full board at its default parameters.
//
// Stimulus. A test card sends a new set of twelve 10-bit words every 66 ns,
// timed to CDF_clk only (it knows nothing of the board's phase); each pair
// of word sets is the even and odd wedges of one event. The board is set
// up over VME: LUTs by block transfer, thresholds, registers.
//
// One run: FIFO reset, run mode, one B0, a short run that fills the L1
// FIFOs, back to load mode; every stored event is then moved to a DAQ
// buffer with the FIFO_R / L1B_W / L1BA control bits and read with a
// 4-word block transfer. The DAQ words are matched against reference
// results of the events sent; events must follow each other without gaps
// and bunch numbers must count up. Saturated events look alike, so the
// run's first test-card event is found by matching the whole sequence.
//
// Procedure, as specified for the bench:
//   1. CS_delay 0-5 are tried. Values that sample the input across a
//      test-card transition give wrong results; at least one must fail
//      and one pass. The first good value after a bad one (the smallest
//      latency) is kept.
//   2. B0_offset is scanned from 4 up. The first event read must carry
//      bunch 0, and exactly one offset must put bunch 0 on the event the
//      card sends LAG crossings after B0. That lag comes from outside the
//      board; LAG = 3 is this bench's choice.
//   3. The six fine FRED delays and one coarse step are tried. The
//      backplane trigger bits from the b0_fred crossing on must be those
//      of the events from bunch 0 on, shifted by one tick per fine step
//      and one crossing per coarse step.
//   4. All 256 FIFO entries are filled (full flags set) and every one is
//      read back, with header, results and previous-crossing SumEt.
module tb_prefred_run_test;
  import prefred_pkg::*;
  import sumet_ref_pkg::*;

  localparam int NEV = 300;
  localparam int SHORT = 24;
  // crossings between B0 and the test-card event that belongs to bunch 0
  // (in the experiment this comes from outside the board)
  localparam int LAG = 3;
  localparam logic [4:0] SLOT = 5'd9;
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
  logic [5:0] tt_fred_delay = 6'd0;
  logic [19:0] tt_summary, tt_fred;

  prefred_top dut (.*);

  always #1 clk = ~clk;
  always begin
    #6 cdf_clk = 1;
    #6 cdf_clk = 0;
  end

  int checks = 0, failures = 0;
  int n_blt = 0, n_events_read = 0, n_pass_delay = 0, n_fail_delay = 0;
  int n_sync_off = 0, bunch_gaps = 0, n_fred_runs = 0;
  bit cs_ok [6];

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL %s t=%0t", what, $time);
    end
  endtask

  // ---------------- test card ----------------
  logic [9:0] ev [NEV][12][2];
  result_t    exp_r [NEV];
  logic [3:0] exp_t [NEV];
  logic [15:0] thr [4] = '{16'd250, 16'd700, 16'd1500, 16'd8000};
  int sent = 0;

  // even words on the CDF_clk rising edge, odd words 66 ns later
  always @(posedge cdf_clk)
    for (int s = 0; s < 12; s++) csin[10*s +: 10] = ev[sent % NEV][s][0];
  always @(negedge cdf_clk) begin
    for (int s = 0; s < 12; s++) csin[10*s +: 10] = ev[sent % NEV][s][1];
    sent++;
  end

  function automatic logic [3:0] trig_of(input result_t r);
    logic [3:0] t;
    t[0] = r.et_ovf  || (r.sumet > thr[0][10:0]);
    t[1] = r.et_ovf  || (r.sumet > thr[1][10:0]);
    t[2] = r.met_ovf || (r.metsq > thr[2]);
    t[3] = r.met_ovf || (r.metsq > thr[3]);
    return t;
  endfunction

  function automatic dataout_t pack(input int e);
    dataout_t d;
    d = '0;
    d.sumet = exp_r[e].sumet; d.sumex = exp_r[e].sumex; d.sumey = exp_r[e].sumey;
    d.metsq = exp_r[e].metsq; d.et_trig = exp_t[e][1:0]; d.met_trig = exp_t[e][3:2];
    return d;
  endfunction

  // DAQ words 2 and 3 of a read-back event against the expected result
  // (FRED bits and the pass-through bit 31 are not compared)
  function automatic bit same(input logic [31:0] w [4], input dataout_t d);
    return (w[1] & 32'hFFF0_FFFF) == {8'h00, d[55:32]} &&
           (w[2] & 32'h7FFF_FFFF) == d[31:0];
  endfunction

  logic [31:0] rd [256][4];

  // ---------------- VME master ----------------
  logic [31:0] xbuf [64];

  function automatic logic [31:0] vaddr(input logic [3:0] tgt, input logic [19:0] off);
    return {SLOT, 3'b000, tgt, off};
  endfunction

  task automatic vme_xfer(input logic [31:0] addr, input bit wr, input int beats);
    bit bad;
    bad = 0;
    @(negedge clk);
    vme_a = addr[31:2];
    vme_am = (beats > 1) ? 6'h0B : 6'h09;
    n_write = !wr;
    @(negedge clk);
    n_as = 0;
    @(negedge clk);
    for (int b = 0; b < beats; b++) begin
      int t;
      vme_wdata = xbuf[b];
      n_ds0 = 0; n_ds1 = 0;
      t = 0;
      while (n_dtack && n_berr && t < 200) begin @(negedge clk); t++; end
      if (t >= 200 || !n_berr) bad = 1;
      if (!wr) xbuf[b] = vme_rdata;
      n_ds0 = 1; n_ds1 = 1;
      t = 0;
      while ((!n_dtack || !n_berr) && t < 200) begin @(negedge clk); t++; end
      @(negedge clk);
    end
    n_as = 1;
    @(negedge clk);
    chk(!bad, "VME cycle acknowledged");
    if (beats > 1) n_blt++;
  endtask

  task automatic wreg(input int w, input logic [7:0] v);
    xbuf[0] = {v, 24'h0};
    vme_xfer(vaddr(TGT_CTRL, 20'(4 * w)), 1, 1);
  endtask

  task automatic rreg(input int w, output logic [7:0] v);
    vme_xfer(vaddr(TGT_CTRL, 20'(4 * w)), 0, 1);
    v = xbuf[0][31:24];
  endtask

  task automatic crossings(input int n);
    repeat (6 * n) @(negedge clk);
  endtask

  // one run: FIFO reset, run mode, B0 on a CDF_clk rising edge (the
  // test-card event sent in that crossing is remembered), `n` crossings,
  // load mode; then read back the first `n` events.
  //   bad  - events whose results do not follow the test-card sequence
  //   bun0 - bunch number of the first event read (bunches must count up)
  //   sync - the event tagged bunch 0 is the one sent LAG crossings
  //          after B0
  task automatic run_and_read(input int cs, input int off, input int n, input bit report,
                              output int bad, output int bun0, output bit sync);
    int first, prev_sumet, b0_ev, best_hits;
    logic [7:0] r;
    bad = 0; bun0 = -1; sync = 0;
    wreg(0, 8'(off));
    wreg(1, 8'(cs));
    wreg(3, 8'h02); wreg(3, 8'h00);        // FIFO reset
    wreg(3, 8'h01);                        // run
    crossings(3);
    @(posedge cdf_clk);
    #1 b0_ev = (sent + LAG) % NEV;
    n_b0 = 0;
    @(posedge cdf_clk);
    #1 n_b0 = 1;
    crossings(off + 1 + n);                // B0 offset, then n events
    wreg(3, 8'h00);                        // back to load mode
    rreg(6, r);
    if (n >= 256) chk(r == 8'hFF, "FIFOs full after 256 events");
    for (int j = 0; j < n; j++) begin
      logic [1:0] ba;
      ba = 2'(j);
      wreg(3, {ba, 6'b110000});            // L1BA, L1B_W, FIFO_R
      vme_xfer(vaddr(4'(8 + ba), 20'h0), 0, 4);
      for (int w = 0; w < 4; w++) rd[j][w] = xbuf[w];
    end
    // the test-card event the run started on: the one from which the
    // whole sequence read back matches (saturated events look alike)
    first = -1; best_hits = 0;
    for (int k = 0; k < NEV; k++) begin
      int hits;
      hits = 0;
      for (int j = 0; j < n; j++) hits += int'(same(rd[j], pack((k + j) % NEV)));
      if (hits > best_hits) begin best_hits = hits; first = k; end
    end
    bun0 = int'(rd[0][0][7:0]);
    sync = (first >= 0) && ((first + (256 - bun0) % 256) % NEV == b0_ev);
    prev_sumet = 0;
    for (int j = 0; j < n; j++) begin
      dataout_t d;
      d = pack((first + j) % NEV);
      if (!same(rd[j], d) || rd[j][3] != 32'(prev_sumet)) bad++;
      if (rd[j][0] != {BOARD, 8'(bun0 + j)}) bunch_gaps++;
      if (report) begin
        chk(rd[j][0] == {BOARD, 8'(j)}, "header: board ID and bunch number");
        chk((rd[j][1] & 32'hFFF0_FFFF) == {8'h00, d[55:32]}, "DAQ word 2");
        chk((rd[j][2] & 32'h7FFF_FFFF) == d[31:0], "DAQ word 3");
        chk(rd[j][3] == 32'(prev_sumet), "previous-crossing SumEt");
        n_events_read++;
      end
      prev_sumet = int'(rd[j][2][10:0]);
    end
    // a short run leaves later events behind; a full one stops at 256
    if (n >= 256) begin
      rreg(7, r);
      chk(r == 8'hFF, "FIFOs empty after reading all 256 events");
    end
  endtask

  // FRED outputs, one sample per tick from the B0 crossing on
  bit cap = 0;
  logic [4:0] fq [$];
  always @(negedge clk) if (cap) fq.push_back({b0_fred, trigbit_fred});

  // one run with FRED delay `fd`: `pos` is the tick, counted from B0, at
  // which b0_fred rises; `bad` counts crossings from there whose trigger
  // bits are not those of the events from bunch 0 on.
  task automatic fred_run(input int cs, input int off, input logic [5:0] fd,
                          output int pos, output int bad);
    int b0_ev;
    wreg(0, 8'(off)); wreg(1, 8'(cs)); wreg(2, {2'b00, fd});
    wreg(3, 8'h02); wreg(3, 8'h00);
    wreg(3, 8'h01);
    crossings(3);
    fq.delete();
    @(posedge cdf_clk);
    #1 b0_ev = (sent + LAG) % NEV;
    n_b0 = 0; cap = 1;
    @(posedge cdf_clk);
    #1 n_b0 = 1;
    crossings(off + 10 + SHORT);
    cap = 0;
    wreg(3, 8'h00);
    pos = -1; bad = 0;
    foreach (fq[i]) if (pos < 0 && fq[i][4]) pos = i;
    if (pos < 0) bad = SHORT;
    else begin
      chk(fq[pos + 5][4] && !fq[pos + 6][4], "b0_fred lasts one crossing");
      for (int i = 0; i < SHORT; i++)
        for (int t = 0; t < 6; t++)
          if (fq[pos + 6*i + t][3:0] != exp_t[(b0_ev + i) % NEV]) begin
            bad++;
            break;
          end
    end
  endtask

  initial begin
    int best, best_off;
    for (int e = 0; e < NEV; e++) begin
      int maxv;
      maxv = (e % 7 == 3) ? 1022 : (e % 3) ? 120 : 300;
      for (int s = 0; s < 12; s++)
        for (int j = 0; j < 2; j++) ev[e][s][j] = 10'($urandom_range(0, maxv));
      if (e % 31 == 5) ev[e][$urandom_range(0, 11)][1] = 10'h3FF;
      exp_r[e] = sumet(ev[e]);
      exp_t[e] = trig_of(exp_r[e]);
    end
    repeat (4) @(negedge clk);
    rst = 0;
    repeat (12) @(negedge clk);
    // board set-up
    for (int p = 0; p < 3; p++)
      for (int blk = 0; blk < 64; blk++) begin
        for (int w = 0; w < 64; w++)
          xbuf[w] = {8'h00, lut_word(2*p+1, 12'(64*blk + w))[11:0], lut_word(2*p, 12'(64*blk + w))[11:0]};
        vme_xfer(vaddr(TGT_LUT, 20'((p << 15) | (blk << 8))), 1, 64);
      end
    xbuf[0] = {thr[1], thr[0]}; vme_xfer(vaddr(TGT_THR, 20'h0), 1, 1);
    xbuf[0] = {thr[3], thr[2]}; vme_xfer(vaddr(TGT_THR, 20'h4), 1, 1);
    wreg(2, 8'o21);                         // any FRED delay
    // CS_delay scan: results must follow the test-card sequence
    for (int cs = 0; cs < 6; cs++) begin
      int bad, bun0;
      bit sync;
      run_and_read(cs, 4, SHORT, 0, bad, bun0, sync);
      cs_ok[cs] = (bad == 0);
      $display("CS_delay %0d: %0d of %0d events wrong", cs, bad, SHORT);
      if (bad == 0) n_pass_delay++; else n_fail_delay++;
    end
    chk(n_pass_delay > 0, "some CS_delay gives correct results");
    chk(n_fail_delay > 0, "a wrong CS_delay is detected");
    // smallest latency: the first good value after a bad one
    best = -1;
    for (int cs = 0; cs < 6; cs++)
      if (best < 0 && cs_ok[cs] && !cs_ok[(cs + 5) % 6]) best = cs;
    chk(best >= 0, "a window of good CS_delay values");
    // B0_offset scan (more than the SUMET latency): bunch 0 on the first
    // event read, and on the event the test card meant for bunch 0
    best_off = -1;
    if (best >= 0)
      for (int off = 4; off < 12; off++) begin
        int bad, bun0;
        bit sync;
        run_and_read(best, off, SHORT, 0, bad, bun0, sync);
        $display("B0_offset %0d: first bunch %0d, synchronous %0d", off, bun0, sync);
        chk(bad == 0, "results unaffected by B0_offset");
        if (bun0 == 0 && sync) begin
          n_sync_off++;
          if (best_off < 0) best_off = off;
        end
      end
    chk(n_sync_off == 1, "exactly one B0_offset is synchronous");
    chk(bunch_gaps == 0, "bunch numbers count up without gaps");
    // fred_delay scan: the same bits, only shifted in time; each fine
    // step is one tick, each coarse step one crossing
    if (best >= 0 && best_off >= 0) begin
      int pos0, pos, bad;
      pos0 = -1;
      for (int fd = 0; fd < 6; fd++) begin
        fred_run(best, best_off, 6'(8 + fd), pos, bad);
        $display("fred_delay 1%0d (octal): b0_fred after %0d ticks, %0d crossings wrong", fd, pos, bad);
        if (fd == 0) pos0 = pos;
        chk(bad == 0, "FRED trigger bits follow bunch 0 on");
        chk(pos == pos0 + fd, "fine FRED delay shifts by one tick per step");
        n_fred_runs++;
      end
      fred_run(best, best_off, 6'o32, pos, bad);
      $display("fred_delay 32 (octal): b0_fred after %0d ticks, %0d crossings wrong", pos, bad);
      chk(bad == 0, "FRED trigger bits follow bunch 0 on");
      chk(pos == pos0 + 2*6 + 2, "coarse FRED delay shifts by one crossing per step");
      n_fred_runs++;
    end
    // full FIFO run with the chosen delays
    if (best >= 0 && best_off >= 0) begin
      int bad, bun0;
      bit sync;
      run_and_read(best, best_off, 256, 1, bad, bun0, sync);
      chk(bun0 == 0 && sync, "bunch 0 synchronous in the full run");
    end
    $display("cs_delay_pass=%0d cs_delay_fail=%0d chosen cs_delay=%0d b0_offset=%0d events_read=%0d blt=%0d",
             n_pass_delay, n_fail_delay, best, best_off, n_events_read, n_blt);
    chk(n_events_read == 256, "256 events read back");
    chk(n_fred_runs == 7, "seven FRED delay runs");
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
