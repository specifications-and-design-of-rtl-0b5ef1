// tb_met_square: MET^2 = (mx^2 + my^2) / 4 for 9-bit magnitudes, forced to
// 16'hFFFF when it exceeds 16 bits or when ovf_in is set.
module tb_met_square;
  logic clk = 0, ce_sq = 0, ce_add = 0, ovf_in = 0;
  logic [8:0] ex_mag, ey_mag;
  logic [15:0] metsq;
  logic ovf;
  int checks = 0, failures = 0, n_big = 0;

  met_square dut (.*);
  always #1 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s %0d %0d -> %0d", what, ex_mag, ey_mag, metsq); end
  endtask

  initial begin
    for (int n = 0; n < 1000; n++) begin
      int v;
      bit o;
      @(negedge clk);
      ex_mag = 9'($urandom); ey_mag = 9'($urandom);
      if (n == 0) begin ex_mag = 9'd511; ey_mag = 9'd0; end
      ovf_in = (n % 13 == 0); ce_sq = 1;
      @(negedge clk); ce_sq = 0; ce_add = 1;
      @(negedge clk); ce_add = 0;
      v = (int'(ex_mag) * ex_mag + int'(ey_mag) * ey_mag) / 4;
      o = ovf_in || v > 65535;
      if (v > 65535) n_big++;
      chk(ovf == o, "overflow");
      chk(metsq == (o ? 16'hFFFF : 16'(v)), "metsq");
    end
    chk(n_big > 0, "16-bit overflow exercised");
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
