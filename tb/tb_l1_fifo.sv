// tb_l1_fifo: random writes and reads against a queue model, including
// runs that fill the FIFO to its 256-entry depth (full flag, writes
// ignored) and drain it (empty flag, reads ignored). Read data appears on
// dout one clock after rd.
module tb_l1_fifo;
  logic clk = 0, rst = 1, wr = 0, rd = 0;
  logic [8:0] din = '0, dout;
  logic full, empty;
  logic [8:0] q [$];
  logic [8:0] exp_dout = '0;
  int checks = 0, failures = 0, n_full = 0, n_empty_rd = 0;

  l1_fifo dut (.*);
  always #1 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 6000; n++) begin
      int mode;
      mode = (n / 600) % 3;   // 0 balanced, 1 mostly writes, 2 mostly reads
      @(negedge clk);
      chk(empty == (q.size() == 0), "empty");
      chk(full == (q.size() == 256), "full");
      chk(dout == exp_dout, "dout");
      wr = ($urandom_range(0, 9) < (mode == 1 ? 9 : mode == 2 ? 1 : 5));
      rd = ($urandom_range(0, 9) < (mode == 2 ? 9 : mode == 1 ? 1 : 5));
      din = 9'($urandom);
      if (full && wr) n_full++;
      if (empty && rd) n_empty_rd++;
      // model update for the coming edge (read sees pre-write contents)
      begin
        int sz0;
        sz0 = q.size();
        if (rd && sz0 > 0) exp_dout = q.pop_front();
        if (wr && sz0 < 256) q.push_back(din);
      end
    end
    chk(n_full > 0 && n_empty_rd > 0, "full and empty exercised");
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
