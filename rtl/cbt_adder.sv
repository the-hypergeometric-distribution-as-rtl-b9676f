// cbt_adder -- condensed balanced tree (CBT) adder: the scaled sum (average)
// of 2^M stochastic numbers.
//
// A balanced tree of 2^M - 1 two-way muxes in M layers picks one data bit per
// cycle. Layer k (k = 1 nearest the data inputs) is steered by bit k-1 of the
// M-bit state of a single NLFSR, so the tree passes d[sel]. Because the NLFSR
// visits each of its 2^M states exactly once per 2^M cycles, every data input
// is sampled equally often, which a select word made of M independent LFSR
// SNGs cannot guarantee. The tree, the single NLFSR in place of M select SNGs
// and M = 5 for 32 inputs are the source design's; the mapping of NLFSR bits
// to layers is this implementation's choice.
//
// Interface: `load` restarts the NLFSR at its seed, `en` advances it. `z` is
// combinational in `d` and the current `sel`.
module cbt_adder #(
  parameter int unsigned  M    = sc_pkg::SEL_W,
  parameter logic [M-1:0] TAPS = sc_pkg::NLFSR_TAPS,   // primitive, bit M-1 set
  parameter logic [M-1:0] SEED = sc_pkg::NLFSR_SEED
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic             en,
  input  logic [2**M-1:0]  d,
  output logic [M-1:0]     sel,
  output logic             z
);

  nlfsr #(.W(M), .TAPS(TAPS), .SEED(SEED)) u_nlfsr (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (load),
    .en    (en),
    .state (sel)
  );

  // lvl[k] holds the 2^(M-k) outputs of layer k; lvl[0] is the data.
  logic [2**M-1:0] lvl [M+1];

  assign lvl[0] = d;

  for (genvar k = 1; k <= M; k++) begin : g_layer
    for (genvar i = 0; i < 2**(M-k); i++) begin : g_mux
      assign lvl[k][i] = sel[k-1] ? lvl[k-1][2*i+1] : lvl[k-1][2*i];
    end
    assign lvl[k][2**M-1:2**(M-k)] = '0;   // unused upper bits
  end

  assign z = lvl[M][0];

endmodule
