// cam_subtractor -- correlation adjusted mux (CAM) subtractor for stochastic
// numbers.
//
// A 2-way mux with select stream S ~ 0.5 picks either X or the inverted Y, so
// the output value is 0.5*X + 0.5*(1-Y); read as a bipolar number (2p-1) it
// is X - Y. Y's SNG shares the LFSR state R with X's SNG but compares the
// inverted state ~R. That makes Y anti-correlated with X, and the inverter on
// the mux input turns it back into a stream maximally correlated with X, so
// the two mux data inputs overlap as much as possible and the output error
// comes only from the bits where they differ.
//
// Interface: `x_bit` is the current bit of X (its SNG is shared by all
// subtractors of the KDE and lives outside), `r` the shared LFSR state,
// `b_y` the binary value of Y, `sel` the current select bit. `z` is the
// output bit, combinational. With sel = 1 the mux passes X, with sel = 0 the
// inverted Y (the select polarity is this implementation's choice).
module cam_subtractor #(
  parameter int unsigned W = sc_pkg::LFSR_W
) (
  input  logic [W-1:0] r,
  input  logic [W-1:0] b_y,
  input  logic         x_bit,
  input  logic         sel,
  output logic         z
);

  logic y_bit;

  // Y's comparator sees the inverted LFSR state.
  sng #(.W(W), .INVERT_R(1'b1)) u_sng_y (
    .r       (r),
    .b       (b_y),
    .bit_out (y_bit)
  );

  always_comb z = sel ? x_bit : ~y_bit;

endmodule
