// tb_towtrg_logic: random CRATESUM tower-trigger packets, with sparse and
// dense di-object counts so that both exact sums and the limit at 3 are
// exercised; compares the 20-bit summary with an independent model.
module tb_towtrg_logic;
  logic [9:0] first [12], second [12];
  logic [19:0] summary;
  int checks = 0, failures = 0, n_sat = 0, n_exact = 0;
  logic clk = 0;

  towtrg_logic dut (.*);
  always #1 clk = ~clk;

  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic [19:0] e;
      int dens;
      dens = n % 4;        // 0: almost empty ... 3: dense
      for (int i = 0; i < 12; i++) begin
        first[i] = 10'($urandom); second[i] = 10'($urandom);
        if ($urandom_range(0, 3) >= dens) first[i][5:0] = 6'h0;
        if ($urandom_range(0, 3) >= dens) first[i][9:6] = 4'h0;
        if ($urandom_range(0, 3) >= dens) second[i] = 10'h0;
      end
      e = '0;
      for (int j = 0; j < 3; j++) begin
        int s;
        s = 0;
        for (int i = 0; i < 12; i++) s += first[i][2*j +: 2];
        if (s > 3) n_sat++; else n_exact++;
        e[2*j +: 2] = 2'(s > 3 ? 3 : s);
      end
      for (int i = 0; i < 12; i++) begin
        for (int b = 6; b < 10; b++) if (first[i][b]) e[b] = 1'b1;
        for (int b = 0; b < 10; b++) if (second[i][b]) e[10+b] = 1'b1;
      end
      #1;
      checks++;
      if (summary !== e) begin
        failures++;
        if (failures < 10) $display("FAIL summary %h expected %h", summary, e);
      end
    end
    checks++;
    if (n_sat == 0 || n_exact == 0) failures++;
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
