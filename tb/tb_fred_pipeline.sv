// tb_fred_pipeline: a new random word enters at every CS_132ns tick; for
// every coarse (0-7) and fine (0-7, 6 and 7 acting as 5) setting, the
// output must change exactly 6*coarse + fine + 1 ticks after the word was
// sampled, and hold the word of that crossing.
module tb_fred_pipeline;
  logic clk = 0;
  logic [2:0] lphase = 0;
  logic ce_cs132;
  logic [5:0] fred_delay = '0;
  logic [4:0] din = '0, dout;
  int checks = 0, failures = 0;
  int tick = 0;
  logic [4:0] hist [int];

  fred_pipeline dut (.*);
  assign ce_cs132 = (lphase == 0);
  always #1 clk = ~clk;
  always @(posedge clk) begin
    if (ce_cs132) hist[tick] = din;    // word sampled at this tick
    lphase <= (lphase == 5) ? 3'd0 : lphase + 3'd1;
    tick <= tick + 1;
  end
  always @(negedge clk) if (lphase == 0) din <= 5'($urandom);

  initial begin
    for (int d = 0; d < 64; d++) begin
      int coarse, fine, dl;
      @(negedge clk);
      while (lphase != 1) @(negedge clk);
      fred_delay = 6'(d);
      coarse = d >> 3; fine = (d % 8 > 5) ? 5 : d % 8;
      dl = 6 * coarse + fine + 1;
      repeat (60) @(negedge clk);
      // check 12 consecutive ticks: output = word sampled at the latest
      // sample tick s with s + dl <= current tick
      for (int t = 0; t < 12; t++) begin
        int s;
        s = tick - 1 - dl;
        while (!hist.exists(s)) s--;
        checks++;
        if (dout !== hist[s]) begin
          failures++;
          if (failures < 10) $display("FAIL delay %0d tick %0d", d, tick);
        end
        @(negedge clk);
      end
    end
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
