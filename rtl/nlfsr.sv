// nlfsr -- non-linear feedback shift register (de Bruijn counter) that steps
// through all 2^W states, the all-zero state included, in 2^W cycles.
//
// It is a W-bit maximum-period Fibonacci LFSR whose feedback bit is XORed
// with a NOR of the W-1 bits that stay in the register after the shift. When
// those bits are all zero the XOR flips the feedback, which splices the
// all-zero state in between 100..0 and 00..01. Used as the select word of the
// condensed balanced tree adder, every select value occurs exactly once per
// 2^W cycles. The LFSR + (W-1)-input NOR + XOR construction is the source
// design's; taps and seed are this implementation's choice.
//
// Interface and timing as `lfsr`: `load` puts SEED in, `en` advances one state.
module nlfsr #(
  parameter int unsigned   W    = sc_pkg::SEL_W,
  parameter logic [W-1:0]  TAPS = sc_pkg::NLFSR_TAPS,
  parameter logic [W-1:0]  SEED = sc_pkg::NLFSR_SEED
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         en,
  output logic [W-1:0] state
);

  logic lin_fb;   // feedback of the underlying LFSR
  logic zero_lo;  // (W-1)-input NOR of the bits that remain after the shift
  logic fb;

  always_comb begin
    lin_fb  = ^(state & TAPS);
    zero_lo = ~|state[W-2:0];
    fb      = lin_fb ^ zero_lo;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    state <= SEED;
    else if (load) state <= SEED;
    else if (en)   state <= {state[W-2:0], fb};
  end

endmodule
