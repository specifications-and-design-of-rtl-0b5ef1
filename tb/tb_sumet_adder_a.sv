// tb_sumet_adder_a: random wedge words; the registered partial sums must
// equal the signed sums of the four wedges of each group, with the sign of
// each wedge's cos (X) or sin (Y) taken from its azimuth, and the pair sums
// and the saturation flag must match.
module tb_sumet_adder_a;
  import prefred_pkg::*;
  import sumet_ref_pkg::*;
  logic clk = 0, ce = 0, even_in = 0;
  et_t etin [N_CS];
  ps_t ps [6];
  logic [ET_W:0] et_pair [6];
  logic sat, ps_even;
  int checks = 0, failures = 0;

  sumet_adder_a dut (.*);
  always #1 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int n = 0; n < 300; n++) begin
      int px [3], py [3];
      bit s_exp;
      int j;
      @(negedge clk);
      j = n % 2;
      s_exp = 0;
      for (int s = 0; s < 12; s++) begin
        etin[s] = et_t'($urandom_range(0, (n % 3 == 0) ? 1023 : 1022));
        if (etin[s] == 10'h3FF) s_exp = 1;
      end
      even_in = (j == 0); ce = 1;
      for (int g = 0; g < 3; g++) begin px[g] = 0; py[g] = 0; end
      for (int s = 0; s < 12; s++) begin
        int fold;
        real th;
        fold = (s <= 2) ? s : (s <= 5) ? 5 - s : (s <= 8) ? s - 6 : 11 - s;
        th = angle_deg(s, j) * PI / 180.0;
        px[fold] += ($cos(th) > 0.0) ? int'(etin[s]) : -int'(etin[s]);
        py[fold] += ($sin(th) > 0.0) ? int'(etin[s]) : -int'(etin[s]);
      end
      @(negedge clk);
      ce = 0;
      for (int g = 0; g < 3; g++) begin
        chk(int'(ps[g]) == px[g], "X partial sum");
        chk(int'(ps[3+g]) == py[g], "Y partial sum");
        chk(int'(et_pair[2*g]) + int'(et_pair[2*g+1]) ==
            int'(etin[g]) + etin[11-g] + etin[5-g] + etin[6+g], "pair sums");
      end
      chk(sat == s_exp, "saturation flag");
      chk(ps_even == (j == 0), "phase tag");
      // register holds while ce is low
      etin[0] = ~etin[0];
      @(negedge clk);
      chk(int'(ps[0]) == px[0], "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
