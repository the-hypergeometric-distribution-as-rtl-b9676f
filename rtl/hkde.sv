// hkde -- hypergeometric-inspired stochastic kernel density estimation (KDE)
// circuit for one pixel.
//
// It estimates P(X32) = 1/32 * sum_{t=0..31} exp(-4*|X32 - Xt|), the
// probability density of the pixel's current value X32 given its values
// X0..X31 in the 32 previous frames; comparing it with a threshold separates
// foreground from background pixels. All arithmetic is done on 255-bit
// stochastic numbers (SNs) in three layers:
//
//   subtraction     32 CAM subtractors give the bipolar SNs X32 - Xt. One
//                   8-bit LFSR is shared by the SNG of X32 and the 32 SNGs of
//                   Xt; the Xt comparators see the inverted LFSR state so that
//                   after the subtractor's inverter both mux inputs are
//                   maximally correlated. A second LFSR and SNG make the
//                   select stream S0 ~ 0.5 shared by all 32 subtractors.
//   exponentiation  32 saturating-counter FSMs turn each difference into a
//                   unipolar SN of value exp(-4|X32 - Xt|).
//   averaging       a 32-input condensed balanced tree adder, a mux tree whose
//                   select word is the state of one 5-bit NLFSR, averages the
//                   32 terms into the output stream Z.
//
// Operation: a `start` pulse reloads all RNS seeds, centres the FSMs and
// clears the result. For the next STREAM_LEN = 255 cycles `busy` is high, one
// bit of every SN is produced per cycle and the 1s of Z are counted. Then
// `done` rises and `ones` holds the count; P(X32) ~ ones / 255. `done` stays
// until the next `start`. Pixel inputs must be held while `busy`.
//
// The three layers, the shared RNS, the CAM subtractor, the CBT adder, the
// 8-bit LFSRs, 5-bit NLFSR and 255-bit streams follow the source design. The
// start/busy/done control, the ones counter, the second LFSR for S0, all
// seeds and polynomials and the FSM size are this implementation's choices.
// `sub_bits`, `exp_bits` and `tree_sel` expose the inner streams per layer.
module hkde
  import sc_pkg::*;
#(
  parameter int unsigned W       = LFSR_W,
  parameter int unsigned FRAMES  = NUM_FRAMES,
  parameter int unsigned M       = SEL_W,
  parameter int unsigned LEN     = STREAM_LEN
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic [W-1:0]              pix_ref,    // X32, the current frame
  input  logic [FRAMES-1:0][W-1:0]  pix_hist,   // X0 .. X31
  output logic                      busy,
  output logic                      done,
  output logic                      z,          // output SN bit
  output logic [W-1:0]              ones,       // 1s of Z in the last stream
  output logic [FRAMES-1:0]         sub_bits,   // subtraction layer bits
  output logic [FRAMES-1:0]         exp_bits,   // exponentiation layer bits
  output logic [M-1:0]              tree_sel    // CBT adder select word
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} ctrl_e;

  ctrl_e        st;
  logic [W-1:0] cyc;
  logic         load, en;

  always_comb begin
    load = start;
    en   = (st == S_RUN) && !start;
    busy = (st == S_RUN);
    done = (st == S_DONE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= S_IDLE;
      cyc  <= '0;
      ones <= '0;
    end else if (start) begin
      st   <= S_RUN;
      cyc  <= '0;
      ones <= '0;
    end else if (st == S_RUN) begin
      ones <= ones + W'(z);
      cyc  <= cyc + 1'b1;
      if (cyc == W'(LEN - 1)) st <= S_DONE;
    end
  end

  // ---- random number sources --------------------------------------------
  logic [W-1:0] r_pix, r_sel;
  logic         x_ref_bit, s0_bit;

  lfsr #(.W(W), .TAPS(PIX_TAPS[W-1:0]), .SEED(PIX_SEED[W-1:0])) u_lfsr_pix (
    .clk(clk), .rst_n(rst_n), .load(load), .en(en), .state(r_pix)
  );

  lfsr #(.W(W), .TAPS(SEL_TAPS[W-1:0]), .SEED(SEL_SEED[W-1:0])) u_lfsr_sel (
    .clk(clk), .rst_n(rst_n), .load(load), .en(en), .state(r_sel)
  );

  sng #(.W(W), .INVERT_R(1'b0)) u_sng_ref (
    .r(r_pix), .b(pix_ref), .bit_out(x_ref_bit)
  );

  sng #(.W(W), .INVERT_R(1'b0)) u_sng_s0 (
    .r(r_sel), .b(SEL_LEVEL[W-1:0]), .bit_out(s0_bit)
  );

  // ---- subtraction and exponentiation layers ----------------------------
  for (genvar t = 0; t < FRAMES; t++) begin : g_frame
    cam_subtractor #(.W(W)) u_sub (
      .r(r_pix), .b_y(pix_hist[t]), .x_bit(x_ref_bit), .sel(s0_bit),
      .z(sub_bits[t])
    );

    abs_exp_fsm #(.STATES(EXP_STATES), .G(EXP_G)) u_exp (
      .clk(clk), .rst_n(rst_n), .init(load), .en(en),
      .in_bit(sub_bits[t]), .out_bit(exp_bits[t])
    );
  end

  // ---- averaging layer ---------------------------------------------------
  cbt_adder #(.M(M), .TAPS(NLFSR_TAPS[M-1:0]), .SEED(NLFSR_SEED[M-1:0])) u_cbt (
    .clk(clk), .rst_n(rst_n), .load(load), .en(en),
    .d(exp_bits), .sel(tree_sel), .z(z)
  );

  initial assert (FRAMES == 2**M && LEN <= 2**W - 1)
    else $error("hkde: FRAMES must be 2**M and LEN at most 2**W-1");

endmodule
