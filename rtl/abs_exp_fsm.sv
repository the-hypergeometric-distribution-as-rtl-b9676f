// abs_exp_fsm -- sequential stochastic element computing exp(-2*G*|x|) of a
// bipolar stochastic number x.
//
// A saturating up/down counter with STATES states moves up on an input 1 and
// down on an input 0. Its Moore output is 1 in the middle states and 0 in the
// G lowest and the G highest states. For x = 0 the counter wanders evenly and
// the output is almost always 1; the further x is from 0 the more time the
// counter spends pinned at one end, where the output is 0. With state ratio
// r = (1+x)/(1-x) the mass in the end states approaches 1 - r^-G, which is
// close to exp(-2G|x|). The source design names this element (absolute-value
// exponentiation, exp(-4|x|) in the KDE) without its insides: the counter
// structure, STATES = 32 and G = 2 are this implementation's choice.
//
// Interface: `init` (synchronous, priority over `en`) puts the counter in the
// middle state STATES/2; `en` lets `in_bit` move it one step. `out_bit`
// depends only on the current state, so it lags the input by one cycle.
module abs_exp_fsm #(
  parameter int unsigned STATES = sc_pkg::EXP_STATES,
  parameter int unsigned G      = sc_pkg::EXP_G
) (
  input  logic clk,
  input  logic rst_n,
  input  logic init,
  input  logic en,
  input  logic in_bit,
  output logic out_bit
);

  localparam int unsigned SW = $clog2(STATES);
  localparam logic [SW-1:0] S_MID  = SW'(STATES / 2);
  localparam logic [SW-1:0] S_LAST = SW'(STATES - 1);
  localparam logic [SW-1:0] S_LO   = SW'(G);              // first 1-state
  localparam logic [SW-1:0] S_HI   = SW'(STATES - G);     // first upper 0-state

  logic [SW-1:0] state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    state <= S_MID;
    else if (init) state <= S_MID;
    else if (en) begin
      if (in_bit) begin
        if (state != S_LAST) state <= state + 1'b1;
      end else begin
        if (state != '0)     state <= state - 1'b1;
      end
    end
  end

  always_comb out_bit = (state >= S_LO) && (state < S_HI);

  initial assert (STATES >= 2 * G + 2 && (STATES & (STATES - 1)) == 0)
    else $error("abs_exp_fsm: STATES must be a power of two above 2*G+1");

endmodule
