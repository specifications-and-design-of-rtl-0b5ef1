// tb_controller: drives the local VME strobe interface and the P2 trigger
// control lines of the controller directly. Checks: control register
// write/read-back, status and version words, module ID string, ACK timing
// (normal and dataout reads), LUT/threshold write strobes, run-mode
// refusal of writes, load-mode manual FIFO read / buffer write strobes,
// and the run-side sequencing: B0 arming of FIFO writes, L1 accept
// (FIFO read, buffer write with L1BA, two-tick FP_str), L1 reject, HALT
// and RESET, and the masked FIFO-full error flag.
module tb_controller;
  import prefred_pkg::*;
  logic clk = 0, rst = 1;
  logic [2:0] lp = 0;
  logic ce_cdf, ce_cs132;
  logic [26:2] vme_address = '0;
  logic n_modsel = 1, n_vme_data_str = 1, vme_write = 0;
  logic [31:0] vme_wdata = '0, vme_rdata, proc_rdata = 32'hC0DE_0001, daq_rdata = 32'hDA0_0002;
  logic n_ack, n_vme_error;
  logic n_halt = 1, n_reset = 1, n_b0 = 1, n_l1a = 1, n_l1r = 1;
  logic [1:0] n_l1ba = 2'b11;
  logic n_cdf_error;
  logic [7:0] ff = '0, ef = 8'hFF;
  logic src_config = 1;
  logic run, lut_add_msb, fifo_rst, thr_we, thres_sel, thr_ren;
  logic [2:0] vme_lut_en, n_lut_write;
  logic [1:0] dataout_ren;
  logic vme_version_ren, src_etin, fifo_w, fifo_r, vme_fifo_wen, l1b_w;
  logic [1:0] l1ba, l2ba, l2w;
  logic fp_str, n_bp_trigbits_en, aux_enable, aux_spare;
  logic [5:0] fred_delay;
  logic [2:0] cs_delay;
  logic [7:0] bunch;
  logic b0_delayed;
  logic [23:0] board_id;
  logic [6:0] lights;
  int checks = 0, failures = 0;
  int c_lutw [3], c_thr, c_fw, c_fr, c_bw, c_fp, c_rst;
  logic [1:0] last_l1ba;

  controller dut (.*);
  always #1 clk = ~clk;
  always @(posedge clk) lp <= (lp == 5) ? 3'd0 : lp + 3'd1;
  assign ce_cdf = (lp == 0);
  assign ce_cs132 = (lp == 0);

  always @(posedge clk) begin
    for (int p = 0; p < 3; p++) if (!n_lut_write[p]) c_lutw[p]++;
    if (thr_we) c_thr++;
    if (fifo_w) c_fw++;
    if (fifo_r) c_fr++;
    if (l1b_w) begin c_bw++; last_l1ba = l1ba; end
    if (fp_str) c_fp++;
    if (fifo_rst) c_rst++;
  end

  task automatic clear_counts();
    c_lutw = '{0, 0, 0}; c_thr = 0; c_fw = 0; c_fr = 0; c_bw = 0; c_fp = 0; c_rst = 0;
  endtask

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // one VME transfer at the strobe level; returns read data and ACK delay
  task automatic vme(input logic [3:0] tgt, input logic [19:0] off, input bit wr,
                     input logic [31:0] wd, output logic [31:0] rd, output int dly);
    @(negedge clk);
    vme_address = '0;
    vme_address[23:20] = tgt;
    vme_address[19:2] = off[19:2];
    vme_write = wr; vme_wdata = wd; n_modsel = 0;
    @(negedge clk);
    n_vme_data_str = 0;
    dly = 0;
    while (n_ack && dly < 100) begin @(negedge clk); dly++; end
    rd = vme_rdata;
    n_vme_data_str = 1;
    @(negedge clk);
    n_modsel = 1;
    chk(n_ack, "ACK released after strobe");
  endtask

  task automatic wreg(input int w, input logic [7:0] v);
    logic [31:0] rd; int d;
    vme(TGT_CTRL, 20'(w * 4), 1, {v, 24'h0}, rd, d);
  endtask

  function automatic logic [7:0] id_char(input int i);
    logic [255:0] s;
    s = "PreFRED SUMET UChicago EDG board";
    return s[8*(31 - i) +: 8];
  endfunction

  task automatic crossing(input int n);
    repeat (6 * n) @(negedge clk);
  endtask

  // drive a trigger line low across exactly one CDF tick
  task automatic pulse_l1(input bit accept, input logic [1:0] ba);
    while (lp != 2) @(negedge clk);
    if (accept) n_l1a = 0; else n_l1r = 0;
    n_l1ba = ~ba;
    crossing(1);
    n_l1a = 1; n_l1r = 1; n_l1ba = 2'b11;
    crossing(2);
  endtask

  initial begin
    logic [31:0] rd;
    int d;
    repeat (3) @(negedge clk);
    rst = 0;
    // ---- register write / read back in load mode
    for (int r = 0; r < 20; r++) begin
      logic [7:0] v [6];
      for (int w = 0; w < 6; w++) begin
        v[w] = 8'($urandom);
        if (w == 3) v[w] = v[w] & 8'hC4;   // keep run, reset, FP_str, strobes off
        wreg(w, v[w]);
      end
      for (int w = 0; w < 6; w++) begin
        logic [7:0] m;
        m = (w == 0 || w == 2) ? 8'h3F : (w == 1) ? 8'h07 : 8'hFF;
        vme(TGT_CTRL, 20'(w * 4), 0, 0, rd, d);
        chk(rd[31:24] == (v[w] & m) && rd[23:0] == 0, $sformatf("register %0d", w));
        chk(d == 6, "ACK delay");
      end
      chk(fred_delay == (v[2] & 8'h3F) && cs_delay == v[1][2:0], "register outputs");
      chk(aux_enable == v[5][0] && aux_spare == v[5][1], "aux control");
      chk(n_bp_trigbits_en == !v[3][2], "backplane trigger enable");
    end
    wreg(3, 8'h00);
    ff = 8'h5A; ef = 8'hA5;
    vme(TGT_CTRL, 6 * 4, 0, 0, rd, d); chk(rd[31:24] == 8'h5A, "FF status");
    vme(TGT_CTRL, 7 * 4, 0, 0, rd, d); chk(rd[31:24] == 8'hA5, "EF status");
    ff = 0; ef = 8'hFF;
    vme(TGT_CTRL, 8 * 4, 0, 0, rd, d); chk(rd[31:24] == 8'h81, "controller version");
    vme(TGT_CTRL, 9 * 4, 0, 0, rd, d); chk(rd == proc_rdata, "processor version");
    for (int i = 0; i < 32; i++) begin
      vme(TGT_ID, 20'(i * 4), 0, 0, rd, d);
      chk(rd[31:24] == id_char(i), "module ID");
    end
    chk(board_id == 24'h5E0001, "board ID");
    // ---- LUT and threshold writes, dataout ACK delay
    clear_counts();
    for (int i = 0; i < 30; i++) begin
      int p;
      p = i % 3;
      vme(TGT_LUT, 20'((p << 15) | ((i & 1) << 14) | (i << 2)), 1, $urandom, rd, d);
    end
    chk(c_lutw[0] == 10 && c_lutw[1] == 10 && c_lutw[2] == 10, "one LUT write strobe per access");
    vme(TGT_THR, 20'h4, 1, 32'h1234_5678, rd, d);
    chk(c_thr == 1, "threshold write strobe");
    vme(TGT_THR, 20'h4, 0, 0, rd, d);
    chk(rd == proc_rdata, "threshold read path");
    vme(TGT_DOUT, 20'h8000, 0, 0, rd, d);
    chk(d == 30 && rd == proc_rdata, "dataout read ACK delay");
    vme(TGT_DAQ2, 20'hC, 0, 0, rd, d);
    chk(rd == daq_rdata, "DAQ buffer read path");
    // ---- load mode: manual FIFO write, FIFO read and buffer write
    clear_counts();
    vme(TGT_FIFO, 0, 1, 32'hCAFE_F00D, rd, d);
    chk(c_fw == 1, "VME FIFO write strobe");
    wreg(3, 8'b1011_0000);     // L1BA=2, L1B_W, FIFO_R
    repeat (4) @(negedge clk);
    chk(c_fr == 1 && c_bw == 1 && last_l1ba == 2, "manual FIFO read and buffer write");
    wreg(3, 8'h02);            // reset bit
    chk(fifo_rst, "FIFO reset from register");
    wreg(3, 8'h00);
    // ---- run mode
    wreg(0, 8'd0);             // b0 offset 0
    ff_mask_test: begin
      wreg(4, 8'h04);
      wreg(3, 8'h01);          // run
      chk(run && lights[2] && !lights[0], "run light");
      chk(!n_bp_trigbits_en && aux_enable, "run enables outputs");
      clear_counts();
      wreg(0, 8'd9);           // refused in run mode
      vme(TGT_CTRL, 0, 0, 0, rd, d);
      chk(rd[31:24] == 0, "register write refused in run mode");
      vme(TGT_LUT, 20'h10, 1, 32'h1, rd, d);
      chk(c_lutw[0] == 0, "LUT write refused in run mode");
      vme(TGT_LUT, 20'h10, 0, 0, rd, d);
      chk(rd == 0, "LUT read refused in run mode");
      vme(TGT_THR, 0, 1, 32'h1, rd, d);
      chk(c_thr == 0, "threshold write refused in run mode");
      vme(TGT_THR, 0, 0, 0, rd, d);
      chk(rd == proc_rdata, "threshold read allowed in run mode");
      vme(TGT_DAQ1, 0, 0, 0, rd, d);
      chk(rd == daq_rdata, "DAQ read allowed in run mode");
      // no FIFO writes before the first B0
      clear_counts();
      crossing(5);
      chk(c_fw == 0, "FIFO writes wait for B0");
      while (lp != 2) @(negedge clk);
      n_b0 = 0; crossing(1); n_b0 = 1;
      clear_counts();
      crossing(20);
      chk(c_fw == 20, "one FIFO write per crossing after B0");
      // L1 accepts and rejects
      for (int i = 0; i < 12; i++) begin
        logic [1:0] ba;
        bit acc;
        ba = 2'($urandom); acc = (i % 3 != 2);
        clear_counts();
        pulse_l1(acc, ba);
        chk(c_fr == 1, "FIFO read per L1 decision");
        chk(c_bw == (acc ? 1 : 0), "buffer write only on accept");
        chk(c_fp == (acc ? 2 : 0), "FP_str two ticks on accept");
        if (acc) chk(last_l1ba == ba, "buffer number from L1BA");
      end
      // error flag: masked full flag ignored, unmasked one latched
      ff = 8'h04; crossing(2);
      chk(n_cdf_error, "masked FIFO full ignored");
      ff = 8'h10; crossing(2);
      ff = 8'h00; crossing(1);
      chk(!n_cdf_error && lights[5], "unmasked FIFO full raises error");
      // HALT stops FIFO traffic; RESET during HALT clears FIFOs and error
      n_halt = 0; crossing(2);
      clear_counts();
      pulse_l1(1, 2'd1);
      crossing(3);
      chk(c_fw == 0 && c_fr == 0 && c_bw == 0, "HALT stops FIFO access");
      chk(lights[4], "halt light");
      n_reset = 0; crossing(2); n_reset = 1;
      chk(c_rst > 0 && n_cdf_error, "RESET during HALT clears FIFOs and error");
      n_halt = 1; crossing(3);
      chk(c_fw == 0, "FIFO writes wait for B0 after HALT");
      n_reset = 0; clear_counts(); crossing(2); n_reset = 1;
      chk(c_rst == 0, "RESET ignored without HALT");
      while (lp != 2) @(negedge clk);
      n_b0 = 0; crossing(1); n_b0 = 1;
      clear_counts(); crossing(4);
      chk(c_fw == 4, "FIFO writes resume at B0");
      wreg(3, 8'h00);           // run bit may be cleared in run mode
      chk(!run, "leave run mode");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
