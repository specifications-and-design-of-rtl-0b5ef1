// tb_towtrg_data_processor: drives the two 66 ns CRATESUM packets of each
// crossing on a free-running 22 ns phase count and checks that the
// registered summary of crossing c appears one crossing later, and that
// the FRED output carries the same summary delayed by the coarse FRED
// delay (fine delay 0), for coarse delays 0 to 7.
module tb_towtrg_data_processor;
  logic clk = 0;
  logic [2:0] lphase = 0;
  logic ce_66, ce_cs132, even;
  logic [119:0] csin = '0;
  logic [5:0] fred_delay = '0;
  logic [19:0] summary, tofred;
  logic [9:0] f [12], s [12];
  logic [19:0] hist [$];
  int checks = 0, failures = 0, cur = -1;

  towtrg_data_processor dut (.*);
  always #1 clk = ~clk;
  always @(posedge clk) lphase <= (lphase == 5) ? 3'd0 : lphase + 3'd1;
  assign ce_66 = (lphase == 0) || (lphase == 3);
  assign ce_cs132 = (lphase == 0);
  assign even = (lphase < 3);

  function automatic logic [19:0] model();
    logic [19:0] e;
    e = '0;
    for (int j = 0; j < 3; j++) begin
      int t;
      t = 0;
      for (int i = 0; i < 12; i++) t += f[i][2*j +: 2];
      e[2*j +: 2] = 2'(t > 3 ? 3 : t);
    end
    for (int i = 0; i < 12; i++) begin
      e[9:6] |= f[i][9:6];
      e[19:10] |= s[i];
    end
    return e;
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  // checker: at lphase 2, the summary of the crossing driven last
  always @(negedge clk)
    if (lphase == 2 && cur >= 0) begin
      chk(summary == hist[0], "summary one crossing later");
      if (cur % 50 >= 10)
        chk(tofred == hist[fred_delay[5:3]], $sformatf("FRED output, coarse delay %0d", fred_delay[5:3]));
    end

  initial begin
    for (int c = 0; c < 400; c++) begin
      if (c % 50 == 0) fred_delay = 6'((c / 50) << 3);
      // first packet, present at the lphase-0 edge
      @(negedge clk);
      while (lphase != 0) @(negedge clk);
      for (int i = 0; i < 12; i++) begin
        f[i] = 10'($urandom);
        if ($urandom_range(0, 2) != 0) f[i][5:0] = 6'($urandom) & 6'h15;
        if ($urandom_range(0, 2) != 0) f[i][9:6] = 4'h0;
        s[i] = ($urandom_range(0, 3) == 0) ? 10'(1 << $urandom_range(0, 9)) : 10'h0;
        csin[10*i +: 10] = f[i];
      end
      while (lphase != 3) @(negedge clk);
      for (int i = 0; i < 12; i++) csin[10*i +: 10] = s[i];
      hist.push_front(model());
      if (hist.size() > 10) void'(hist.pop_back());
      cur = c;
    end
    @(negedge clk);
    while (lphase != 3) @(negedge clk);
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
