// sc_pkg -- shared constants of the stochastic kernel density estimation
// (KDE) datapath.
//
// Stochastic numbers (SNs) are bit-streams whose fraction of 1s encodes a
// value. Every SN here is produced by an 8-bit maximum-period LFSR feeding a
// comparator, so one stream is 2^8-1 = 255 bits long and each LFSR state is
// visited exactly once per stream. The KDE averages 32 kernel terms with a
// 32-way mux tree whose select word comes from a 5-bit NLFSR.
//
// The 8-bit width, the 255-bit stream, the 32 history frames and the 5-bit
// NLFSR follow the source design. The feedback polynomials, seeds, the select
// SNG level and the exponentiation FSM size are this implementation's choice.
package sc_pkg;

  // Random number source of the pixel and select SNGs.
  localparam int unsigned LFSR_W     = 8;
  localparam int unsigned STREAM_LEN = (1 << LFSR_W) - 1;   // 255 bits

  // Fibonacci tap masks (bit i set = state[i] enters the XOR feedback).
  // x^8+x^6+x^5+x^4+1 for the shared pixel RNS, x^8+x^6+x^5+x^3+1 for the
  // select RNS, so the two sources are not shifted copies of each other.
  localparam logic [LFSR_W-1:0] PIX_TAPS = 8'hB8;
  localparam logic [LFSR_W-1:0] PIX_SEED = 8'h01;
  localparam logic [LFSR_W-1:0] SEL_TAPS = 8'hB4;
  localparam logic [LFSR_W-1:0] SEL_SEED = 8'h5A;

  // Select SNG level of the subtraction layer: P(S=1) = (128-1)/255 ~ 0.5.
  localparam logic [LFSR_W-1:0] SEL_LEVEL = 8'd128;

  // History frames averaged by the KDE and the select width of the tree.
  localparam int unsigned NUM_FRAMES = 32;
  localparam int unsigned SEL_W      = 5;                   // log2(NUM_FRAMES)

  // 5-bit NLFSR: x^5+x^3+1 base LFSR.
  localparam logic [SEL_W-1:0] NLFSR_TAPS = 5'h14;
  localparam logic [SEL_W-1:0] NLFSR_SEED = 5'h00;

  // Absolute-value exponentiation FSM: exp(-2*G*|x|) with G = 2 gives the
  // exp(-4|x|) kernel of the KDE.
  localparam int unsigned EXP_STATES = 32;
  localparam int unsigned EXP_G      = 2;

endpackage
