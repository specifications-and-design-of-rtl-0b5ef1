// towtrg_logic: TOWTRG tower-trigger summary.
//
// Each of the 12 CRATESUMs sends a 20-bit tower-trigger summary in two
// 10-bit packets. The first packet holds three 2-bit di-object counts
// (bits 5:0, how many objects of a kind passed a di-object threshold,
// 3 meaning 3 or more) and four single-object bits (9:6); the second holds
// ten more single-object bits. The detector summary ORs every
// single-object bit over the 12 inputs and adds each di-object count over
// the 12 inputs, limiting the sum to 3.
//
// summary[5:0]  = three saturated di-object counts
// summary[9:6]  = OR of first-packet bits 9:6
// summary[19:10] = OR of second-packet bits 9:0
// Purely combinational. The OR / saturating add follows the
// specification; the placement of the bits in the packets is this
// design's choice (the specification only puts the di-object bits in the
// first packet).
module towtrg_logic (
  input  logic [9:0]  first  [12],
  input  logic [9:0]  second [12],
  output logic [19:0] summary
);
  always_comb begin
    summary = '0;
    for (int j = 0; j < 3; j++) begin
      logic [5:0] s;
      s = '0;
      for (int i = 0; i < 12; i++) s += 6'(first[i][2*j +: 2]);
      summary[2*j +: 2] = (s > 6'd3) ? 2'd3 : s[1:0];
    end
    for (int i = 0; i < 12; i++) begin
      summary[9:6]   |= first[i][9:6];
      summary[19:10] |= second[i];
    end
  end
endmodule
