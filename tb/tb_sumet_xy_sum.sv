// tb_sumet_xy_sum: feeds random sign-magnitude LUT words for an even and
// an odd phase and checks SumEx = even LUT_0..2 + odd LUT_3..5 and
// SumEy = even LUT_3..5 + odd LUT_0..2, reduced to sign + 9-bit magnitude
// (LSB dropped) with overflow at 256 GeV (1024 quarter-GeV).
module tb_sumet_xy_sum;
  import prefred_pkg::*;
  logic clk = 0, ce66 = 0, ce_out = 0;
  lut_data_t lut_data [N_LUT];
  logic ex_sign, ex_ovf, ey_sign, ey_ovf;
  logic [8:0] ex_mag, ey_mag;
  int checks = 0, failures = 0, n_ovf = 0;

  sumet_xy_sum dut (.*);
  always #1 clk = ~clk;

  function automatic int val(input lut_data_t d);
    return d[11] ? -int'(d[10:0]) : int'(d[10:0]);
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int n = 0; n < 500; n++) begin
      lut_data_t ev [6], od [6];
      int sx, sy, ax, ay, lim;
      lim = (n % 4 == 0) ? 2047 : 300;
      for (int k = 0; k < 6; k++) begin
        ev[k] = {4'h0, 1'($urandom), 11'($urandom_range(0, lim))};
        od[k] = {4'h0, 1'($urandom), 11'($urandom_range(0, lim))};
      end
      @(negedge clk); lut_data = ev; ce66 = 1;
      @(negedge clk); lut_data = od;
      @(negedge clk); ce66 = 0; ce_out = 1;
      @(negedge clk); ce_out = 0;
      sx = 0; sy = 0;
      for (int k = 0; k < 3; k++) begin
        sx += val(ev[k]) + val(od[3+k]);
        sy += val(ev[3+k]) + val(od[k]);
      end
      ax = sx < 0 ? -sx : sx;
      ay = sy < 0 ? -sy : sy;
      if (ax >= 1024) n_ovf++;
      chk(ex_ovf == (ax >= 1024) && ey_ovf == (ay >= 1024), "overflow");
      chk(ex_sign == (sx < 0) && ey_sign == (sy < 0), "sign");
      if (ax < 1024) chk(ex_mag == 9'(ax >> 1), "SumEx magnitude");
      if (ay < 1024) chk(ey_mag == 9'(ay >> 1), "SumEy magnitude");
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
