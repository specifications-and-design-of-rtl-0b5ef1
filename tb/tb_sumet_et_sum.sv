// tb_sumet_et_sum: two phases of six pair sums; SumEt must be the total of
// all twelve in 1 GeV units (LSB dropped), saturated to 2047 with the
// overflow flag when the total reaches 2048 GeV.
module tb_sumet_et_sum;
  import prefred_pkg::*;
  logic clk = 0, ce66 = 0, ce_out = 0;
  logic [ET_W:0] et_pair [6];
  logic [10:0] sumet;
  logic ovf;
  int checks = 0, failures = 0, n_ovf = 0;

  sumet_et_sum dut (.*);
  always #1 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int n = 0; n < 500; n++) begin
      logic [ET_W:0] a [6], b [6];
      int tot, lim;
      lim = (n % 3 == 0) ? 2046 : 500;
      tot = 0;
      for (int k = 0; k < 6; k++) begin
        a[k] = 11'($urandom_range(0, lim)); b[k] = 11'($urandom_range(0, lim));
        tot += a[k] + b[k];
      end
      @(negedge clk); et_pair = a; ce66 = 1;
      @(negedge clk); et_pair = b;
      @(negedge clk); ce66 = 0; ce_out = 1;
      @(negedge clk); ce_out = 0;
      if (tot >= 4096) n_ovf++;
      chk(ovf == (tot >= 4096), "overflow");
      chk(sumet == ((tot >= 4096) ? 11'h7FF : 11'(tot >> 1)), "SumEt");
    end
    chk(n_ovf > 0, "overflow exercised");
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
