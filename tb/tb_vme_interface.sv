// tb_vme_interface: a bus master issues single and block-transfer cycles
// with random addresses, modifiers and geographic addresses; a responder
// stands in for the controller and answers each data strobe with ACK (or
// the error line). Checks module select, latched address, address
// increment during BLT, DTACK/BERR generation and that cycles for other
// slots, other address modifiers or 16-bit transfers are ignored.
module tb_vme_interface;
  logic clk = 0, rst = 1;
  logic [31:2] a = '0;
  logic [5:0] am = '0;
  logic n_as = 1, n_ds0 = 1, n_ds1 = 1, n_write = 1, n_lword = 0, n_iack = 1;
  logic [4:0] n_ga = 5'b11010;
  logic n_ack = 1, n_vme_error = 1;
  logic n_modsel, n_vme_data_str, vme_write, n_dtack, n_berr;
  logic [26:2] vme_address;
  logic resp_err = 0;
  int cnt = 0;
  int checks = 0, failures = 0, n_blt = 0, n_skip = 0, n_err = 0;

  vme_interface dut (.*);
  always #1 clk = ~clk;

  // responder: ACK (or error) three clocks after the data strobe
  always @(posedge clk) begin
    if (n_vme_data_str) begin cnt <= 0; n_ack <= 1; n_vme_error <= 1; end
    else begin
      cnt <= cnt + 1;
      if (cnt == 2) begin
        if (resp_err) n_vme_error <= 0; else n_ack <= 0;
      end
    end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  task automatic cycle(input bit selected, input bit blt, input int beats);
    logic [26:2] base;
    base = a[26:2];
    @(negedge clk); n_as = 0;
    @(negedge clk); 
    for (int b = 0; b < beats; b++) begin
      int t;
      n_ds0 = 0; n_ds1 = 0;
      t = 0;
      while (n_dtack && n_berr && t < 20) begin @(negedge clk); t++; end
      chk(selected == (t < 20), "response only when selected");
      chk(n_modsel == !selected, "module select");
      if (selected) begin
        chk(vme_address == 25'(base + (blt ? b : 0)), "address");
        chk(vme_write == !n_write, "write flag");
        chk(n_berr == !resp_err && n_dtack == resp_err, "DTACK/BERR");
      end
      n_ds0 = 1; n_ds1 = 1;
      t = 0;
      while ((!n_dtack || !n_berr) && t < 20) begin @(negedge clk); t++; end
      chk(t < 20, "DTACK released");
      @(negedge clk);
    end
    n_as = 1;
    repeat (2) @(negedge clk);
    chk(n_modsel, "deselected after cycle");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 300; n++) begin
      int kind;
      bit sel, blt;
      kind = $urandom_range(0, 9);
      a = 30'($urandom);
      a[31:27] = ~n_ga;
      n_write = 1'($urandom);
      n_lword = 0;
      am = $urandom_range(0, 1) ? 6'h09 : 6'h0D;
      resp_err = 0;
      sel = 1; blt = 0;
      case (kind)
        0: begin a[31:27] = ~n_ga ^ 5'(1 << $urandom_range(0, 4)); sel = 0; end
        1: begin am = 6'h29; sel = 0; end
        2: begin n_lword = 1; sel = 0; end
        3: begin resp_err = 1; n_err++; end
        4, 5: begin am = $urandom_range(0, 1) ? 6'h0B : 6'h0F; blt = 1; n_blt++; end
        default: ;
      endcase
      if (!sel) n_skip++;
      cycle(sel, blt, blt ? $urandom_range(2, 8) : 1);
      if (n % 50 == 49) n_ga = 5'($urandom);
    end
    chk(n_blt > 0 && n_skip > 0 && n_err > 0, "all cycle kinds exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
