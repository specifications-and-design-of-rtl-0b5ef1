// tb_lut_addr_mux: LUT k must get partial sum k in the even phase and
// partial sum 5-k in the odd phase, the VME address when VME owns the
// LUTs, bit 12 always 0 and bit 13 equal to lut_add_msb.
module tb_lut_addr_mux;
  import prefred_pkg::*;
  ps_t ps [6];
  logic ps_even, vme_sel, lut_add_msb;
  logic [11:0] vme_addr;
  lut_addr_t lut_addr [N_LUT];
  int checks = 0, failures = 0;

  lut_addr_mux dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int n = 0; n < 200; n++) begin
      for (int k = 0; k < 6; k++) ps[k] = ps_t'($urandom);
      ps_even = $urandom_range(0, 1);
      vme_sel = (n % 5 == 0);
      lut_add_msb = vme_sel && $urandom_range(0, 1);
      vme_addr = 12'($urandom);
      #1;
      for (int k = 0; k < 6; k++) begin
        logic [11:0] e;
        e = vme_sel ? vme_addr : ps_even ? ps[k] : ps[5-k];
        chk(lut_addr[k] == {lut_add_msb, 1'b0, e}, "lut address");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
