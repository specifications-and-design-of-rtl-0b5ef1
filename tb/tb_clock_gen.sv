// tb_clock_gen: checks the 22 ns tick grid derived from CDF_clk.
// CDF_clk runs with a 6-tick period; after lock, ce_cdf must come every 6
// ticks, lphase must trail phase by CS_delay, ce_66 must fire at lphase 0
// and 3, and `even` must cover lphase 0-2. A 2-tick jump of CDF_clk must
// re-align phase 0 on the new edge. CS_delay = 7 must act as 5.
module tb_clock_gen;
  logic clk = 0, rst = 1, cdf_clk = 0;
  logic [2:0] cs_delay = 3'd2;
  logic [2:0] phase, lphase;
  logic ce_cdf, ce_cs132, ce_66, even;
  int checks = 0, failures = 0;
  int shift = 0;
  int tick = 0;

  clock_gen dut (.*);

  always #1 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at tick %0d phase %0d", what, tick, phase); end
  endtask

  // CDF_clk high for ticks 0-2 of each crossing (offset by `shift`)
  always @(posedge clk) begin
    tick <= tick + 1;
    cdf_clk <= (((tick + 1 + shift) % 6) < 3);
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (20) @(posedge clk);
    for (int n = 0; n < 60; n++) begin
      int csd, exp_l;
      @(negedge clk);
      if (n == 40) shift = 2;
      if (n >= 40 && n < 48) continue;   // settle after the jump
      csd = (cs_delay > 5) ? 5 : cs_delay;
      exp_l = (phase + 6 - csd) % 6;
      chk(ce_cdf == (phase == 0), "ce_cdf");
      chk(lphase == 3'(exp_l), "lphase");
      chk(ce_66 == (exp_l == 0 || exp_l == 3), "ce_66");
      chk(ce_cs132 == (exp_l == 0), "ce_cs132");
      chk(even == (exp_l < 3), "even");
      // phase 0 must come two ticks after the CDF_clk rising edge
      chk(phase == 3'((tick + shift + 5) % 6), "phase alignment");
      if (n == 20) cs_delay = 3'd7;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
