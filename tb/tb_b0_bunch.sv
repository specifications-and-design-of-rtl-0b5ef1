// tb_b0_bunch: B0 pulses at random spacing; for each offset setting the
// delayed B0 must follow the input by offset+1 enabled clocks and the
// bunch counter must restart at 0 on the delayed B0 and count enabled
// clocks between them.
module tb_b0_bunch;
  logic clk = 0, rst = 1, ce = 0, b0 = 0;
  logic [5:0] b0_offset = '0;
  logic b0_delayed;
  logic [7:0] bunch;
  logic hist [$];
  int checks = 0, failures = 0, since = -1000;

  b0_bunch dut (.*);
  always #1 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s off=%0d", what, b0_offset); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int r = 0; r < 12; r++) begin
      b0_offset = (r == 0) ? 6'd0 : (r == 1) ? 6'd63 : 6'($urandom);
      since = -1000;
      for (int n = 0; n < 400; n++) begin
        @(negedge clk);
        ce = 1;
        b0 = ($urandom_range(0, 39) == 0);
        hist.push_front(b0);
        @(negedge clk);
        ce = 0;
        if (hist.size() > b0_offset + 1 && n > 70) begin
          chk(b0_delayed == hist[b0_offset], "b0_delayed");
          if (hist[b0_offset]) since = 0; else since++;
          if (since >= 0) chk(bunch == 8'(since), "bunch");
        end
        if (hist.size() > 80) void'(hist.pop_back());
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
