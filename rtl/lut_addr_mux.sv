// lut_addr_mux: address multiplexers in front of the six phi-weighting LUTs.
//
// Each LUT holds one numerical weighting factor that serves two groups:
// thanks to cos(phi) = sin(90 deg - phi), LUT k multiplies partial sum k in
// the even phase and partial sum 5-k in the odd phase (LUT_0: X_0 then Y_2,
// LUT_1: X_1 then Y_1, LUT_2: X_2 then Y_0, LUT_3: Y_0 then X_2, LUT_4: Y_1
// then X_1, LUT_5: Y_2 then X_0). While VME loads or reads the LUTs, every
// LUT gets the VME address instead.
//
// SRAM address: bit 13 = lut_add_msb (a diagnostic bank bit, 0 in run
// mode), bit 12 = 0 (grounded), bits 11:0 = partial sum or VME_Address[13:2].
// Purely combinational. The crossing follows the specification; the
// address layout too.
module lut_addr_mux
  import prefred_pkg::*;
(
  input  ps_t        ps [6],
  input  logic       ps_even,
  input  logic       vme_sel,
  input  logic [11:0] vme_addr,
  input  logic       lut_add_msb,
  output lut_addr_t  lut_addr [N_LUT]
);
  always_comb begin
    for (int k = 0; k < N_LUT; k++) begin
      logic [11:0] a;
      if (vme_sel)      a = vme_addr;
      else if (ps_even) a = ps[k];
      else              a = ps[5-k];
      lut_addr[k] = {lut_add_msb, 1'b0, a};
    end
  end
endmodule
