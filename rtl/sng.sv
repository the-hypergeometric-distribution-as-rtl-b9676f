// sng -- comparator part of a stochastic number generator (SNG).
//
// Each cycle it compares the random number R from an LFSR with the binary
// value B and emits one bit of the stochastic number: 1 when R < B. Over the
// 2^W-1 states of a maximum-period LFSR exactly B-1 of them are below B, so
// the stream holds exactly B-1 ones (value (B-1)/(2^W-1), no variance).
//
// INVERT_R = 1 gives the comparator of the correlation adjusted mux (CAM)
// subtractor: the LFSR state is inverted before the compare, so the SN made
// from it is anti-correlated with SNs made from R directly. That stream holds
// exactly B ones, since ~R ranges over 0 .. 2^W-2.
//
// Purely combinational; the comparison rule R < B is the source design's.
module sng #(
  parameter int unsigned W        = sc_pkg::LFSR_W,
  parameter bit          INVERT_R = 1'b0
) (
  input  logic [W-1:0] r,
  input  logic [W-1:0] b,
  output logic         bit_out
);

  logic [W-1:0] r_eff;

  always_comb begin
    r_eff   = INVERT_R ? ~r : r;
    bit_out = (r_eff < b);
  end

endmodule
