// tb_threshold_compare: thresholds written in pairs and read back; trigger
// bits 0-1 compare SumEt (11 threshold bits) and 2-3 compare MET^2, strict
// greater-than, forced to 1 by the matching overflow. A second instance
// with NUM_MET_THR = 3 must compare slot 1 with MET^2 as well.
module tb_threshold_compare;
  logic clk = 0, rst = 1, thr_we = 0, thr_sel = 0;
  logic [31:0] wdata = '0, rdata, rdata3;
  logic [10:0] sumet;
  logic et_ovf, met_ovf;
  logic [15:0] metsq;
  logic [3:0] trig, trig3;
  logic [15:0] thr [4];
  int checks = 0, failures = 0;

  threshold_compare dut (.*);
  threshold_compare #(.NUM_MET_THR(3)) dut3 (.clk, .rst, .thr_we, .thr_sel, .wdata,
    .rdata(rdata3), .sumet, .et_ovf, .metsq, .met_ovf, .trig(trig3));
  always #1 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int r = 0; r < 5; r++) begin
      for (int k = 0; k < 4; k++) thr[k] = 16'($urandom_range(0, 3000)) | (k == 1 ? 16'hF800 : 16'h0);
      for (int p = 0; p < 2; p++) begin
        @(negedge clk); thr_sel = p[0]; wdata = {thr[2*p+1], thr[2*p]}; thr_we = 1;
      end
      @(negedge clk); thr_we = 0;
      for (int p = 0; p < 2; p++) begin
        thr_sel = p[0]; #0.2;
        chk(rdata == {thr[2*p+1], thr[2*p]}, "readback");
      end
      for (int n = 0; n < 200; n++) begin
        sumet = 11'($urandom_range(0, 2047));
        metsq = 16'($urandom_range(0, 4000));
        if (n % 20 == 0) begin sumet = thr[0][10:0]; metsq = thr[2]; end
        et_ovf = (n % 17 == 0); met_ovf = (n % 19 == 0);
        #0.2;
        chk(trig[0] == (et_ovf || sumet > thr[0][10:0]), "trig0");
        chk(trig[1] == (et_ovf || sumet > thr[1][10:0]), "trig1");
        chk(trig[2] == (met_ovf || metsq > thr[2]), "trig2");
        chk(trig[3] == (met_ovf || metsq > thr[3]), "trig3");
        chk(trig3[1] == (met_ovf || metsq > thr[1]), "reconfigured trig1");
        chk(trig3[0] == trig[0], "reconfigured trig0");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
