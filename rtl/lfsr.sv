// lfsr -- maximum-period Fibonacci linear feedback shift register, the random
// number source (RNS) of a comparator stochastic number generator.
//
// The register shifts left each enabled cycle; the new bit 0 is the XOR of the
// state bits selected by TAPS. With a primitive feedback polynomial it visits
// every nonzero state once in 2^W-1 cycles, the "without replacement" order
// that makes its SNs hypergeometric rather than Bernoulli. The LFSR itself and
// its maximum period are the source design's; the Fibonacci form, the taps and
// the seed are choices of this implementation.
//
// Interface: `load` (synchronous, has priority over `en`) puts SEED in the
// register; `en` advances it one state. `state` is the current register value.
// Reset (active-low, asynchronous) also loads SEED. SEED must be nonzero.
module lfsr #(
  parameter int unsigned   W    = sc_pkg::LFSR_W,
  parameter logic [W-1:0]  TAPS = sc_pkg::PIX_TAPS,
  parameter logic [W-1:0]  SEED = sc_pkg::PIX_SEED
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         en,
  output logic [W-1:0] state
);

  logic fb;
  assign fb = ^(state & TAPS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    state <= SEED;
    else if (load) state <= SEED;
    else if (en)   state <= {state[W-2:0], fb};
  end

  initial assert (SEED != '0) else $error("lfsr: SEED must be nonzero");

endmodule
