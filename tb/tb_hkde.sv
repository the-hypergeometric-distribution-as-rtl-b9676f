// tb_hkde -- end-to-end self-checking testbench of the stochastic KDE circuit
// at its default size (8-bit LFSRs, 255-bit streams, 32 frames, 5-bit NLFSR).
//
// Each operation applies a current pixel value and 32 history values, pulses
// `start` and follows the 255-cycle stream. A cycle-accurate model written
// out here (both LFSRs, the SNG comparators, the CAM subtractors, the
// saturating-counter FSMs, the NLFSR and the mux tree) predicts every
// subtraction-layer bit, exponentiation-layer bit, select word and output bit,
// and the final count of 1s. The testbench checks that `done` rises exactly
// 255 cycles after `start` and that the estimate ones/255 is close to
// P(X32) = 1/32 * sum exp(-4|X32 - Xt|). Pixel data are generated: background
// pixels whose history scatters around the current value, foreground pixels
// whose history is far from it, and uniform random ones. Per-layer RMS errors
// against the exact layer values are printed.
//
// Mechanisms counted (each must occur): the NLFSR's all-zero select state,
// every tree input sampled exactly once per 32-cycle window, an FSM pinned at
// its top and at its bottom state, a restart by `start` during a stream, and
// a completed operation.
module tb_hkde;
  localparam int FR = 32;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [7:0] pix_ref;
  logic [FR-1:0][7:0] pix_hist;
  logic busy, done, z;
  logic [7:0] ones;
  logic [FR-1:0] sub_bits, exp_bits;
  logic [4:0] tree_sel;

  int checks = 0, failures = 0;
  int n_zero_sel = 0, n_uniform = 0, n_sat_top = 0, n_sat_bot = 0, n_restart = 0, n_done = 0;
  real se_sub = 0.0, se_exp = 0.0, se_out = 0.0;
  int  n_sub = 0, n_out = 0;

  always #5 clk = ~clk;

  hkde dut (
    .clk(clk), .rst_n(rst_n), .start(start), .pix_ref(pix_ref), .pix_hist(pix_hist),
    .busy(busy), .done(done), .z(z), .ones(ones),
    .sub_bits(sub_bits), .exp_bits(exp_bits), .tree_sel(tree_sel));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model state of one stream
  logic [7:0] sp, ss;
  logic [4:0] nl;
  int fsm [FR];
  int cnt_ones, win [32];
  int sub_ones [FR], exp_ones [FR];

  task automatic model_reset();
    sp = 8'h01; ss = 8'h5A; nl = 5'h00;
    foreach (fsm[t]) begin fsm[t] = 16; sub_ones[t] = 0; exp_ones[t] = 0; end
    foreach (win[k]) win[k] = 0;
    cnt_ones = 0;
  endtask

  // Checks and advances n stream cycles; returns at the negedge after the
  // last of them, or, with restart set, pulses start on the last one.
  task automatic model_cycles(input int n, input bit restart);
    for (int i = 0; i < n; i++) begin
      logic xr, s0, zm, f;
      logic [FR-1:0] sb, eb;
      xr = (sp < pix_ref);
      s0 = (ss < 8'd128);
      for (int t = 0; t < FR; t++) begin
        logic y;
        y = ((~sp) < pix_hist[t]);
        sb[t] = s0 ? xr : ~y;
        eb[t] = (fsm[t] >= 2 && fsm[t] < 30);
      end
      zm = eb[nl];
      check(busy && !done, "busy during stream");
      check(sub_bits == sb, $sformatf("cycle %0d subtraction bits", i));
      check(exp_bits == eb, $sformatf("cycle %0d exponentiation bits", i));
      check(tree_sel == nl, $sformatf("cycle %0d select %0d vs %0d", i, tree_sel, nl));
      check(z == zm, $sformatf("cycle %0d output bit", i));
      if (nl == 5'h00) n_zero_sel++;
      win[nl]++;
      if (i % 32 == 31) begin
        bit uni;
        uni = 1'b1;
        foreach (win[k]) begin
          if (win[k] != 1) uni = 1'b0;
          win[k] = 0;
        end
        check(uni, "each tree input sampled once per 32 cycles");
        if (uni) n_uniform++;
      end
      cnt_ones += zm;
      for (int t = 0; t < FR; t++) begin
        sub_ones[t] += sb[t];
        exp_ones[t] += eb[t];
        if (sb[t] && fsm[t] < 31) fsm[t]++;
        else if (!sb[t] && fsm[t] > 0) fsm[t]--;
        if (fsm[t] == 31) n_sat_top++;
        if (fsm[t] == 0) n_sat_bot++;
      end
      sp = {sp[6:0], sp[7] ^ sp[5] ^ sp[4] ^ sp[3]};
      ss = {ss[6:0], ss[7] ^ ss[5] ^ ss[4] ^ ss[2]};
      f = nl[4] ^ nl[2];
      if (nl[3:0] == 4'b0) f = ~f;
      nl = {nl[3:0], f};
      if (restart && i == n - 1) start = 1'b1;
      @(negedge clk);
      start = 1'b0;
    end
  endtask

  // one KDE operation; abort_at > 0 restarts the stream after that many cycles
  task automatic run_op(input int abort_at);
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    model_reset();
    if (abort_at > 0) begin
      model_cycles(abort_at, 1'b1);
      n_restart++;
      model_reset();
    end
    model_cycles(255, 1'b0);
    check(done && !busy, "done exactly 255 cycles after start");
    check(ones == 8'(cnt_ones), $sformatf("ones %0d vs model %0d", ones, cnt_ones));
    if (done) n_done++;
    // accuracy against the exact KDE value
    begin
      real xr_v, p_exact, p_est, sum;
      sum = 0.0;
      xr_v = real'(pix_ref) / 255.0;
      for (int t = 0; t < FR; t++) begin
        real d, e, sub_v, exp_v;
        d = xr_v - real'(pix_hist[t]) / 255.0;
        e = $exp(-4.0 * (d < 0 ? -d : d));
        sum += e;
        sub_v = 2.0 * real'(sub_ones[t]) / 255.0 - 1.0;      // bipolar
        exp_v = real'(exp_ones[t]) / 255.0;
        se_sub += (sub_v - d) ** 2;
        se_exp += (exp_v - e) ** 2;
        n_sub++;
      end
      p_exact = sum / 32.0;
      p_est = real'(ones) / 255.0;
      se_out += (p_est - p_exact) ** 2;
      n_out++;
      check(p_est > p_exact - 0.25 && p_est < p_exact + 0.25,
            $sformatf("estimate %f vs exact %f", p_est, p_exact));
    end
  endtask

  initial begin : stim
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    pix_ref = '0;
    pix_hist = '0;
    for (int op = 0; op < 24; op++) begin
      int kind;
      kind = op % 3;
      pix_ref = 8'($urandom_range(20, 235));
      for (int t = 0; t < FR; t++) begin
        int v;
        case (kind)
          0: v = int'(pix_ref) + $urandom_range(0, 16) - 8;      // background
          1: v = (pix_ref > 128) ? $urandom_range(0, 40)         // foreground
                                 : $urandom_range(215, 255);
          default: v = $urandom_range(0, 255);
        endcase
        if (v < 0) v = 0;
        if (v > 255) v = 255;
        pix_hist[t] = 8'(v);
      end
      run_op(op == 5 ? 100 : -1);
    end
    $display("RMSE per layer: subtraction %f  exponentiation %f  averaging %f",
             $sqrt(se_sub / n_sub), $sqrt(se_exp / n_sub), $sqrt(se_out / n_out));
    $display("mechanisms: zero_sel=%0d uniform_windows=%0d sat_top=%0d sat_bot=%0d restart=%0d done=%0d",
             n_zero_sel, n_uniform, n_sat_top, n_sat_bot, n_restart, n_done);
    check(n_zero_sel > 0, "NLFSR zero state used");
    check(n_uniform > 0, "uniform sampling windows");
    check(n_sat_top > 0, "FSM pinned at top");
    check(n_sat_bot > 0, "FSM pinned at bottom");
    check(n_restart > 0, "restart during a stream");
    check(n_done > 0, "operation completed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
