// controller: the board Controller FPGA (VME transaction control, control
// registers, run sequencing, error handling).
//
// VME side. A transfer is in progress while _vme_data_str is low. The
// local address VME_Address[23:20] selects the target:
//   0 control registers (word = A[5:2], 8 bits in D[31:24])
//   1 module ID (32 ASCII characters, one per word in D[31:24])
//   4 phi-weighting LUT pair A[16:15] (bank bit A[14], entry A[13:2])
//   5 trigger threshold pair A[2]     6 dataout read-back (A[15] = word)
//   7 L1 FIFO write                   8-B DAQ buffer 0-3 (word A[3:2])
// _ACK goes low ACK_TICKS ticks after the strobe (DATAOUT_ACK_TICKS for a
// dataout read, which lets the Data Processor compute results from fake
// E_t words taken from the address) and stays low until the strobe ends.
// Writes take effect on the tick before _ACK falls. In run mode only
// these are honoured: writing the run bit, reading DAQ buffers, control
// registers, module ID and thresholds; other accesses are acknowledged
// and ignored (reads give 0). _vme_error is never asserted.
//
// Control registers (word: bits): 0 B0_offset[5:0]; 1 CS_delay[2:0];
// 2 fred_delay[5:0]; 3 {L1BA[1:0], L1B_W, FIFO_R, FP_str, BP_trigbits_en,
// reset, run}; 4 FF_mask; 5 {spare[5:0], aux_spare, aux_enable}; 6 FF
// (read only); 7 EF (read only); 8 {src_config, type 000, CTRL_VERSION};
// 9 Data Processor version (read from the processor). In load mode,
// writing word 3 with FIFO_R or L1B_W set issues one FIFO read strobe
// and/or, two ticks later, one DAQ buffer write strobe to buffer L1BA;
// the reset bit holds the L1 FIFOs and the error flag in reset (so does
// the board reset).
//
// Run side, on the CDF tick: _HALT, _RESET, _B0, _L1A, _L1R and _L1BA
// are latched. _RESET clears the FIFOs and the error flag only while
// _HALT is asserted. After a halt, FIFO writing (one strobe per CS_132ns
// tick) resumes at the first b0_delayed seen in run mode. An L1 accept or
// reject (in run mode, outside HALT) pops the FIFOs one tick after the
// CDF tick; an accept also writes the DAQ buffer one tick later and
// raises FP_str for two ticks (44 ns) while the L2 data are valid.
// _cdf_error is the latched OR of the unmasked FIFO full flags.
// Lights: {L2 data, error, halt, clock, run, modsel, load}.
//
// Address map, register layout and run-mode rules follow the
// specification; tick counts, strobe shapes and the handling of refused
// accesses are this design's choices.
module controller
  import prefred_pkg::*;
#(
  parameter int unsigned ACK_TICKS         = 6,
  parameter int unsigned DATAOUT_ACK_TICKS = 30,
  parameter logic [3:0]  CTRL_VERSION      = 4'h1,
  parameter logic [23:0] BOARD_ID          = 24'h5E0001,
  parameter logic [255:0] MODULE_ID        = {"PreFRED SUMET UChicago EDG board"}
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        ce_cdf,
  input  logic        ce_cs132,
  // VME
  input  logic [26:2] vme_address,
  input  logic        n_modsel,
  input  logic        n_vme_data_str,
  input  logic        vme_write,
  input  logic [31:0] vme_wdata,
  output logic [31:0] vme_rdata,
  output logic        n_ack,
  output logic        n_vme_error,
  input  logic [31:0] proc_rdata,
  input  logic [31:0] daq_rdata,
  // P2 trigger control
  input  logic        n_halt,
  input  logic        n_reset,
  input  logic        n_b0,
  input  logic        n_l1a,
  input  logic        n_l1r,
  input  logic [1:0]  n_l1ba,
  output logic        n_cdf_error,
  // board status
  input  logic [7:0]  ff,
  input  logic [7:0]  ef,
  input  logic        src_config,
  // control bus
  output logic        run,
  output logic        lut_add_msb,
  output logic        fifo_rst,
  output logic        thr_we,
  output logic        thres_sel,
  output logic        thr_ren,
  output logic [2:0]  vme_lut_en,
  output logic [2:0]  n_lut_write,
  output logic [1:0]  dataout_ren,
  output logic        vme_version_ren,
  output logic        src_etin,
  output logic        fifo_w,
  output logic        fifo_r,
  output logic        vme_fifo_wen,
  output logic        l1b_w,
  output logic [1:0]  l1ba,
  output logic [1:0]  l2ba,
  output logic [1:0]  l2w,
  output logic        fp_str,
  output logic        n_bp_trigbits_en,
  output logic        aux_enable,
  output logic        aux_spare,
  output logic [5:0]  fred_delay,
  output logic [2:0]  cs_delay,
  output logic [7:0]  bunch,
  output logic        b0_delayed,
  output logic [23:0] board_id,
  output logic [6:0]  lights
);
  // ---------------- registers ----------------
  logic [5:0] b0_offset;
  logic [7:0] reg3, ff_mask, reg5;
  logic       strobe;
  logic [5:0] cnt;
  logic [5:0] limit;
  logic       act;
  logic [3:0] tgt;
  logic [3:0] word;
  logic       load;
  logic       allowed;
  // run-side state
  logic       halt_q, reset_q;
  logic [1:0] l1ba_q;
  logic       armed, err_q;
  logic [3:0] seq;          // one-hot L1A/L1R sequence
  logic       seq_acc;
  logic       man_r, man_w1, man_w2;
  logic [1:0] man_ba;

  assign strobe = !n_vme_data_str;
  assign tgt    = vme_address[23:20];
  assign word   = vme_address[5:2];
  assign run    = reg3[0];
  assign load   = !run;
  assign board_id    = BOARD_ID;
  assign n_vme_error = 1'b1;

  // Access rules of load and run mode.
  always_comb begin
    allowed = 1'b0;
    case (tgt)
      TGT_CTRL: allowed = !vme_write || load || (word == 4'd3);
      TGT_ID:   allowed = !vme_write;
      TGT_LUT:  allowed = load;
      TGT_THR:  allowed = load || !vme_write;
      TGT_DOUT: allowed = load && !vme_write;
      TGT_FIFO: allowed = load && vme_write;
      TGT_DAQ0, TGT_DAQ1, TGT_DAQ2, TGT_DAQ3: allowed = !vme_write;
      default:  allowed = 1'b0;
    endcase
  end

  assign limit = (tgt == TGT_DOUT) ? 6'(DATAOUT_ACK_TICKS) : 6'(ACK_TICKS);
  assign act   = strobe && (cnt == limit - 6'd1);

  always_ff @(posedge clk) begin
    if (rst || !strobe) cnt <= '0;
    else if (cnt != limit) cnt <= cnt + 6'd1;
  end
  assign n_ack = !(strobe && cnt == limit);

  // VME-driven control bus signals.
  always_comb begin
    logic acc;
    acc             = strobe && allowed;
    thres_sel       = vme_address[2];
    thr_ren         = acc && tgt == TGT_THR && !vme_write;
    thr_we          = act && allowed && tgt == TGT_THR && vme_write;
    vme_lut_en      = '0;
    n_lut_write     = '1;
    lut_add_msb     = 1'b0;
    if (acc && tgt == TGT_LUT) begin
      lut_add_msb = vme_address[14];
      for (int p = 0; p < 3; p++)
        if (vme_address[16:15] == 2'(p)) begin
          vme_lut_en[p]  = 1'b1;
          n_lut_write[p] = !(act && vme_write);
        end
    end
    src_etin        = acc && tgt == TGT_DOUT;
    dataout_ren     = {src_etin && vme_address[15], src_etin && !vme_address[15]};
    vme_version_ren = acc && tgt == TGT_CTRL && word == 4'd9 && !vme_write;
    vme_fifo_wen    = acc && tgt == TGT_FIFO;
    l2ba            = 2'(tgt - 4'h8);
    l2w             = vme_address[3:2];
  end

  // Read data.
  always_comb begin
    vme_rdata = '0;
    if (strobe && allowed && !vme_write) begin
      case (tgt)
        TGT_CTRL: case (word)
          4'd0: vme_rdata[31:24] = {2'b00, b0_offset};
          4'd1: vme_rdata[31:24] = {5'b0, cs_delay};
          4'd2: vme_rdata[31:24] = {2'b00, fred_delay};
          4'd3: vme_rdata[31:24] = reg3;
          4'd4: vme_rdata[31:24] = ff_mask;
          4'd5: vme_rdata[31:24] = reg5;
          4'd6: vme_rdata[31:24] = ff;
          4'd7: vme_rdata[31:24] = ef;
          4'd8: vme_rdata[31:24] = {src_config, 3'b000, CTRL_VERSION};
          4'd9: vme_rdata = proc_rdata;
          default: ;
        endcase
        TGT_ID:   vme_rdata[31:24] = MODULE_ID[8*(31 - int'(vme_address[6:2])) +: 8];
        TGT_LUT, TGT_THR, TGT_DOUT: vme_rdata = proc_rdata;
        TGT_DAQ0, TGT_DAQ1, TGT_DAQ2, TGT_DAQ3: vme_rdata = daq_rdata;
        default: ;
      endcase
    end
  end

  // Register writes.
  always_ff @(posedge clk) begin
    if (rst) begin
      b0_offset  <= '0;
      cs_delay   <= '0;
      fred_delay <= '0;
      reg3       <= '0;
      ff_mask    <= '0;
      reg5       <= '0;
    end else if (act && allowed && vme_write && tgt == TGT_CTRL) begin
      if (load) begin
        case (word)
          4'd0: b0_offset  <= vme_wdata[29:24];
          4'd1: cs_delay   <= vme_wdata[26:24];
          4'd2: fred_delay <= vme_wdata[29:24];
          4'd3: reg3       <= vme_wdata[31:24];
          4'd4: ff_mask    <= vme_wdata[31:24];
          4'd5: reg5       <= vme_wdata[31:24];
          default: ;
        endcase
      end else if (word == 4'd3) begin
        reg3[0] <= vme_wdata[24];           // only the run bit in run mode
      end
    end
  end

  // Load-mode FIFO read / DAQ buffer write strobes from register 3.
  always_ff @(posedge clk) begin
    if (rst) begin
      man_r  <= 1'b0;
      man_w1 <= 1'b0;
      man_w2 <= 1'b0;
      man_ba <= '0;
    end else begin
      man_r  <= act && load && vme_write && tgt == TGT_CTRL && word == 4'd3 && vme_wdata[28];
      man_w1 <= act && load && vme_write && tgt == TGT_CTRL && word == 4'd3 && vme_wdata[29];
      man_w2 <= man_w1;
      if (act && load && vme_write && tgt == TGT_CTRL && word == 4'd3)
        man_ba <= vme_wdata[31:30];
    end
  end

  // ---------------- run-side sequencing ----------------
  b0_bunch u_b0 (.clk, .rst, .ce(ce_cdf), .b0(!n_b0), .b0_offset,
                 .b0_delayed, .bunch);

  always_ff @(posedge clk) begin
    if (rst) begin
      halt_q  <= 1'b0;
      reset_q <= 1'b0;
      l1ba_q  <= '0;
      armed   <= 1'b0;
      err_q   <= 1'b0;
      seq     <= '0;
      seq_acc <= 1'b0;
    end else begin
      seq <= {seq[2:0], 1'b0};
      if (ce_cdf) begin
        halt_q  <= !n_halt;
        reset_q <= !n_halt && !n_reset;
        if (run && n_halt && (!n_l1a || !n_l1r)) begin
          seq[0]  <= 1'b1;
          seq_acc <= !n_l1a;
          l1ba_q  <= ~n_l1ba;
        end
        if (|(ff & ~ff_mask)) err_q <= 1'b1;
      end
      if (halt_q || !run)          armed <= 1'b0;
      else if (b0_delayed)         armed <= 1'b1;
      if (fifo_rst)                err_q <= 1'b0;
    end
  end

  always_comb begin
    fifo_rst = rst || reset_q || (load && reg3[1]);
    fifo_w   = (ce_cs132 && run && armed && !halt_q) ||
               (act && vme_fifo_wen && vme_write);
    fifo_r   = (seq[0] && !halt_q) || man_r;
    l1b_w    = (seq[1] && seq_acc && !halt_q) || man_w2;
    l1ba     = man_w2 ? man_ba : l1ba_q;
    fp_str   = ((seq[2] || seq[3]) && seq_acc) || (load && reg3[3]);
    n_bp_trigbits_en = !(run || reg3[2]);
    aux_enable = run || reg5[0];
    aux_spare  = reg5[1];
    n_cdf_error = !err_q;
    lights = {fp_str, err_q, halt_q, bunch[7], run, !n_modsel, load};
  end
endmodule
