// tb_phi_lut_sram: writes a pattern to random addresses of the 16K x 16
// SRAM and reads it back asynchronously (same tick, no clock edge needed).
module tb_phi_lut_sram;
  logic clk = 0, we = 0;
  logic [13:0] addr = '0;
  logic [15:0] din = '0, dout;
  logic [15:0] model [logic [13:0]];
  int checks = 0, failures = 0;

  phi_lut_sram dut (.*);
  always #1 clk = ~clk;

  initial begin
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      addr = 14'($urandom_range(0, 4095)) | (n % 7 == 0 ? 14'h2000 : 14'h0);
      if (n < 1200 || !model.exists(addr)) begin
        we = 1; din = 16'($urandom);
        model[addr] = din;
        @(negedge clk);
        we = 0;
      end
      #0.2;
      checks++;
      if (dout !== model[addr]) begin failures++; $display("FAIL read %h", addr); end
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
