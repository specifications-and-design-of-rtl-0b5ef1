// tb_daq_interface: events (random dataout + bunch) are written into the
// 72-bit level-1 FIFO; L1A sequences (fifo_r, then l1b_w one clock later)
// move the head event into a random DAQ buffer. Each buffer's four words
// are read back and compared with the expected layout, including the
// previous event's SumEt in word 3. Also checks the L2 data bus, the VME
// test pattern path and the FIFO flags.
module tb_daq_interface;
  import prefred_pkg::*;
  logic clk = 0, fifo_rst = 1, fifo_w = 0, fifo_r = 0, vme_fifo_wen = 0, l1b_w = 0;
  logic [31:0] vme_wdata = '0, rdata;
  dataout_t dataout;
  logic [7:0] bunch = '0, ff, ef;
  logic [23:0] board_id = 24'h5E0001;
  logic [1:0] l1ba = '0, l2ba = '0, l2w = '0;
  logic [30:0] l2_data;
  logic [71:0] q [$];
  logic [71:0] cur = '0;
  int checks = 0, failures = 0, n_pat = 0;

  daq_interface dut (.*);
  always #1 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    dataout = '0;
    repeat (2) @(negedge clk);
    fifo_rst = 0;
    @(negedge clk);
    chk(ef == 8'hFF && ff == 8'h00, "flags after reset");
    for (int n = 0; n < 800; n++) begin
      // write 0-2 events
      for (int w = $urandom_range(0, 2); w > 0; w--) begin
        vme_fifo_wen = ($urandom_range(0, 9) == 0);
        dataout = dataout_t'(56'({$urandom, $urandom}));
        bunch = 8'($urandom);
        vme_wdata = $urandom;
        fifo_w = 1;
        if (q.size() < 256)
          q.push_back(vme_fifo_wen ? {vme_wdata[7:0], vme_wdata, vme_wdata}
                                   : {8'h00, bunch, 56'(dataout)});
        if (vme_fifo_wen) n_pat++;
        @(negedge clk);
        fifo_w = 0; vme_fifo_wen = 0;
      end
      chk((ef == 8'hFF) == (q.size() == 0), "empty flag");
      if (q.size() > 0 && $urandom_range(0, 1)) begin
        logic [71:0] prev;
        logic [1:0] b;
        prev = cur;
        b = 2'($urandom);
        fifo_r = 1;
        @(negedge clk);
        fifo_r = 0;
        cur = q.pop_front();
        chk(l2_data == cur[30:0], "L2 data");
        l1ba = b; l1b_w = 1;
        @(negedge clk);
        l1b_w = 0;
        l2ba = b;
        for (int k = 0; k < 4; k++) begin
          logic [31:0 ]e;
          l2w = 2'(k); #0.2;
          case (k)
            0: e = {board_id, cur[63:56]};
            1: e = {8'h00, cur[55:32]};
            2: e = cur[31:0];
            default: e = {21'b0, prev[10:0]};
          endcase
          chk(rdata == e, $sformatf("buffer %0d word %0d", b, k));
        end
      end
    end
    chk(n_pat > 0, "VME pattern written");
    // fill to full
    while (q.size() < 256) begin
      fifo_w = 1; q.push_back({8'h00, bunch, 56'(dataout)});
      @(negedge clk);
    end
    fifo_w = 0; #0.2;
    chk(ff == 8'hFF, "full flag");
    fifo_rst = 1; @(negedge clk); fifo_rst = 0; #0.2;
    chk(ef == 8'hFF && ff == 8'h00, "flags after FIFO reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
