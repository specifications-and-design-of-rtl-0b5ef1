// vme_interface: VME slave front end of the PreFRED board.
//
// Selects the board for a VME transfer when the address modifier asks for
// an extended (A32) single-word access or block transfer (AM[5:3] = 001,
// AM[0] = 1, AM[2] ignored so supervisory and user accesses both pass,
// AM[1] = 1 for a block transfer), _LWORD is 0, it is not an interrupt
// acknowledge, and A[31:27] equals the slot's geographical address (given
// active low, so inverted). The check is latched one tick after _AS falls
// (the board uses a 10 ns delayed _AS), together with A[26:2] into the
// local address counter VME_Address. _modsel then stays active while _AS
// or a data strobe is. _vme_data_str goes active with a data strobe when
// no acknowledge or error is pending and stays active until the strobe
// ends; during a block transfer each end of _vme_data_str increments
// VME_Address. _DTACK and _BERR follow the Controller's _ACK and
// _vme_error while the board is selected (open-collector on the board,
// logic levels here). All outputs are registered or decoded from
// registers; all strobes are active low as on the bus.
module vme_interface (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:2] a,
  input  logic [5:0]  am,
  input  logic        n_as,
  input  logic        n_ds0,
  input  logic        n_ds1,
  input  logic        n_write,
  input  logic        n_lword,
  input  logic        n_iack,
  input  logic [4:0]  n_ga,
  input  logic        n_ack,
  input  logic        n_vme_error,
  output logic        n_modsel,
  output logic        n_vme_data_str,
  output logic        vme_write,
  output logic [26:2] vme_address,
  output logic        n_dtack,
  output logic        n_berr
);
  logic as_q, modsel_q, blt_q, str_q;
  logic ds_act, match;

  assign ds_act = !n_ds0 || !n_ds1;
  assign match  = (am[5:3] == 3'b001) && am[0] && !n_lword && n_iack &&
                  (a[31:27] == ~n_ga);

  always_ff @(posedge clk) begin
    if (rst) begin
      as_q        <= 1'b1;
      modsel_q    <= 1'b0;
      blt_q       <= 1'b0;
      str_q       <= 1'b0;
      vme_address <= '0;
    end else begin
      as_q <= n_as;
      if (as_q && !n_as) begin
        modsel_q    <= match;
        blt_q       <= am[1];
        vme_address <= a[26:2];
      end else if (n_as && !ds_act) begin
        modsel_q <= 1'b0;
      end
      if (!ds_act)
        str_q <= 1'b0;
      else if (modsel_q && n_ack && n_vme_error)
        str_q <= 1'b1;
      if (str_q && !ds_act && blt_q)
        vme_address <= vme_address + 1'b1;
    end
  end

  assign n_modsel       = ~modsel_q;
  assign n_vme_data_str = ~str_q;
  assign vme_write      = ~n_write;
  assign n_dtack        = ~(modsel_q && !n_ack);
  assign n_berr         = ~(modsel_q && !n_vme_error);
endmodule
