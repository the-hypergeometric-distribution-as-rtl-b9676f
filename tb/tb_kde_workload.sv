// tb_kde_workload -- accuracy workload of the stochastic KDE circuit.
//
// Feeds the KDE circuit (default size) with generated pixel histories that
// imitate a surveillance video: mostly static background pixels with sensor
// noise, some pixels covered by a moving object in part of the history, and
// some with a new foreground value. For every pixel the root-mean-square error
// of each layer is measured against the exact values: the bipolar difference
// X32 - Xt after the subtraction layer, exp(-4|X32 - Xt|) after the
// exponentiation layer and P(X32) of the KDE at the output.
//
// The same pixels are fed to a model of the conventional circuit this design
// improves on, written out here: the history SNGs compare the plain (not
// inverted) shared LFSR state, so the subtractor's mux inputs are
// anti-correlated, and the 32-input mux tree takes its 5 select bits from five
// independent 8-bit LFSR SNGs. The testbench checks that the design's
// subtraction layer is more accurate than that model's and prints the errors
// of all three layers for both. (With the 32-state exponentiation FSM used
// here the correlated difference streams do not carry their advantage through
// the exponentiation layer; the printed figures show by how much.)
module tb_kde_workload;
  localparam int FR   = 32;
  localparam int PIXS = 600;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [7:0] pix_ref;
  logic [FR-1:0][7:0] pix_hist;
  logic busy, done, z;
  logic [7:0] ones;
  logic [FR-1:0] sub_bits, exp_bits;
  logic [4:0] tree_sel;
  int checks = 0, failures = 0;

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
    repeat (PIXS * 300 + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    real se_h [3], se_t [3];
    int  n_l;
    foreach (se_h[k]) begin se_h[k] = 0.0; se_t[k] = 0.0; end
    n_l = 0;
    pix_ref = '0;
    pix_hist = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < PIXS; p++) begin
      int kind, bg;
      logic [7:0] sp, ss;
      logic [7:0] rt [5];
      int fsm_t [FR];
      int sub_h [FR], exp_h [FR], sub_t [FR], exp_t [FR];
      int out_t;
      real xr_v, sum;
      // ---- generate one pixel's history
      kind = $urandom_range(0, 99);
      bg = $urandom_range(10, 245);
      for (int t = 0; t < FR; t++) begin
        int v;
        v = bg + $urandom_range(0, 12) - 6;
        if (kind >= 70 && kind < 85 && t >= 12 && t < 22) v = $urandom_range(0, 255);
        v = (v < 0) ? 0 : (v > 255) ? 255 : v;
        pix_hist[t] = 8'(v);
      end
      if (kind >= 85) pix_ref = 8'((bg + 128) % 256);
      else            pix_ref = 8'(bg + $urandom_range(0, 12) - 6);
      // ---- run the design and, alongside, the conventional model
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      sp = 8'h01; ss = 8'h5A;
      foreach (rt[k]) rt[k] = 8'($urandom_range(1, 255));
      foreach (fsm_t[t]) begin
        fsm_t[t] = 16; sub_h[t] = 0; exp_h[t] = 0; sub_t[t] = 0; exp_t[t] = 0;
      end
      out_t = 0;
      for (int c = 0; c < 255; c++) begin
        logic xr, s0;
        logic [FR-1:0] sb, eb;
        logic [4:0] st;
        xr = (sp < pix_ref);
        s0 = (ss < 8'd128);
        for (int t = 0; t < FR; t++) begin
          sb[t] = s0 ? xr : ~(sp < pix_hist[t]);
          eb[t] = (fsm_t[t] >= 2 && fsm_t[t] < 30);
        end
        for (int k = 0; k < 5; k++) st[k] = (rt[k] < 8'd128);
        out_t += eb[st];
        for (int t = 0; t < FR; t++) begin
          sub_h[t] += sub_bits[t];
          exp_h[t] += exp_bits[t];
          sub_t[t] += sb[t];
          exp_t[t] += eb[t];
          if (sb[t] && fsm_t[t] < 31) fsm_t[t]++;
          else if (!sb[t] && fsm_t[t] > 0) fsm_t[t]--;
        end
        sp = {sp[6:0], sp[7] ^ sp[5] ^ sp[4] ^ sp[3]};
        ss = {ss[6:0], ss[7] ^ ss[5] ^ ss[4] ^ ss[2]};
        foreach (rt[k]) rt[k] = {rt[k][6:0], rt[k][7] ^ rt[k][5] ^ rt[k][4] ^ rt[k][3]};
        @(negedge clk);
      end
      check(done, "result after 255 stream cycles");
      // ---- layer errors against the exact values
      xr_v = real'(pix_ref) / 255.0;
      sum = 0.0;
      for (int t = 0; t < FR; t++) begin
        real d, e;
        d = xr_v - real'(pix_hist[t]) / 255.0;
        e = $exp(-4.0 * (d < 0 ? -d : d));
        sum += e;
        se_h[0] += (2.0 * real'(sub_h[t]) / 255.0 - 1.0 - d) ** 2;
        se_t[0] += (2.0 * real'(sub_t[t]) / 255.0 - 1.0 - d) ** 2;
        se_h[1] += (real'(exp_h[t]) / 255.0 - e) ** 2;
        se_t[1] += (real'(exp_t[t]) / 255.0 - e) ** 2;
      end
      se_h[2] += (real'(ones) / 255.0 - sum / 32.0) ** 2 * 32.0;
      se_t[2] += (real'(out_t) / 255.0 - sum / 32.0) ** 2 * 32.0;
      n_l += FR;
    end
    begin
      string nm [3] = '{"subtraction", "exponentiation", "averaging"};
      real eh [3], et [3];
      for (int k = 0; k < 3; k++) begin
        eh[k] = $sqrt(se_h[k] / n_l);
        et[k] = $sqrt(se_t[k] / n_l);
        $display("%-15s RMSE  this design %f  conventional %f  reduction %0.1f%%",
                 nm[k], eh[k], et[k], 100.0 * (1.0 - eh[k] / et[k]));
      end
      check(eh[0] < et[0], "subtraction layer more accurate");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
