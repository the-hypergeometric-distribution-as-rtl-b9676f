// tb_cbt_workload -- accuracy workload of the condensed balanced tree adder.
//
// Runs 16-, 32- and 64-input CBT adders (M = 4, 5, 6) on LFSR stochastic
// numbers of 63 bits (6-bit LFSR) and 255 bits (8-bit LFSR), with the data
// SNGs either sharing one LFSR (correlated) or each using its own
// (uncorrelated). For every run the data values are random; the error is the
// tree's output value minus the exact mean of its input streams. The same runs
// are fed to a conventional tree modelled here, whose M select bits come from
// M independent LFSR SNGs set to 0.5. Every cycle the CBT output is checked
// against d[select] with the select word from an NLFSR model, and per
// configuration the CBT root-mean-square error must not exceed the
// conventional tree's. The RMS errors and the reduction are printed.
module tb_cbt_workload;
  localparam int RUNS = 5000;   // runs per configuration

  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, en = 1'b0;
  logic [15:0] d4;  logic [3:0] s4;  logic z4;
  logic [31:0] d5;  logic [4:0] s5;  logic z5;
  logic [63:0] d6;  logic [5:0] s6;  logic z6;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cbt_adder #(.M(4), .TAPS(4'hC),  .SEED(4'h0)) dut4 (
    .clk(clk), .rst_n(rst_n), .load(load), .en(en), .d(d4), .sel(s4), .z(z4));
  cbt_adder #(.M(5), .TAPS(5'h14), .SEED(5'h0)) dut5 (
    .clk(clk), .rst_n(rst_n), .load(load), .en(en), .d(d5), .sel(s5), .z(z5));
  cbt_adder #(.M(6), .TAPS(6'h30), .SEED(6'h0)) dut6 (
    .clk(clk), .rst_n(rst_n), .load(load), .en(en), .d(d6), .sel(s6), .z(z6));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Fibonacci LFSR step; x^6+x^5+1 and x^8+x^6+x^5+x^4+1
  function automatic logic [7:0] lfsr_step(logic [7:0] s, int w);
    if (w == 6) return {2'b00, s[4:0], s[5] ^ s[4]};
    return {s[6:0], s[7] ^ s[5] ^ s[4] ^ s[3]};
  endfunction

  // de Bruijn NLFSR step for M = 4, 5, 6 (x^4+x^3+1, x^5+x^3+1, x^6+x^5+1)
  function automatic logic [5:0] nl_step(logic [5:0] s, int m);
    logic f;
    case (m)
      4: begin f = s[3] ^ s[2]; if (s[2:0] == 0) f = ~f; return {2'b00, s[2:0], f}; end
      5: begin f = s[4] ^ s[2]; if (s[3:0] == 0) f = ~f; return {1'b0, s[3:0], f}; end
      default: begin f = s[5] ^ s[4]; if (s[4:0] == 0) f = ~f; return {s[4:0], f}; end
    endcase
  endfunction

  function automatic logic [7:0] rand_state(int w);
    logic [7:0] v;
    do v = 8'($urandom_range(1, (1 << w) - 1)); while (v == 0);
    return v;
  endfunction

  initial begin : watchdog
    repeat (50000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    int ws [2] = '{6, 8};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    foreach (ws[wi]) begin
      for (int corr = 1; corr >= 0; corr--) begin
        int w, n;
        real se_cbt [3], se_trd [3];
        w = ws[wi];
        n = (1 << w) - 1;
        foreach (se_cbt[k]) begin se_cbt[k] = 0.0; se_trd[k] = 0.0; end
        for (int run = 0; run < RUNS; run++) begin
          int b [64];
          logic [7:0] r [64];        // data RNS states
          logic [7:0] rs [6];        // conventional tree select RNS states
          logic [5:0] nl [3];
          int ones_c [3], ones_t [3];
          real mean [3];
          foreach (b[i]) b[i] = $urandom_range(0, n);
          r[0] = rand_state(w);
          foreach (r[i]) if (i > 0) r[i] = corr ? r[0] : rand_state(w);
          foreach (rs[k]) rs[k] = rand_state(w);
          foreach (nl[k]) begin nl[k] = '0; ones_c[k] = 0; ones_t[k] = 0; end
          for (int k = 0; k < 3; k++) begin
            real acc;
            acc = 0.0;
            for (int i = 0; i < (16 << k); i++) acc += (b[i] == 0) ? 0.0 : real'(b[i] - 1);
            mean[k] = acc / real'(16 << k) / real'(n);
          end
          // restart the NLFSRs
          load = 1'b1;
          @(negedge clk);
          load = 1'b0;
          en = 1'b1;
          for (int c = 0; c < n; c++) begin
            logic [63:0] x;
            logic [5:0] st;
            for (int i = 0; i < 64; i++) x[i] = (int'(r[i]) < b[i]);
            d4 = x[15:0]; d5 = x[31:0]; d6 = x;
            st = '0;
            for (int k = 0; k < 6; k++) st[k] = (int'(rs[k]) < (1 << (w - 1)));
            #1;
            check(s4 == nl[0][3:0] && s5 == nl[1][4:0] && s6 == nl[2], "select words");
            check(z4 == x[nl[0][3:0]] && z5 == x[nl[1][4:0]] && z6 == x[nl[2]], "tree outputs");
            ones_c[0] += z4; ones_c[1] += z5; ones_c[2] += z6;
            ones_t[0] += x[st[3:0]]; ones_t[1] += x[st[4:0]]; ones_t[2] += x[st];
            @(negedge clk);
            for (int k = 0; k < 3; k++) nl[k] = nl_step(nl[k], k + 4);
            foreach (r[i]) r[i] = lfsr_step(r[i], w);
            foreach (rs[k]) rs[k] = lfsr_step(rs[k], w);
          end
          en = 1'b0;
          for (int k = 0; k < 3; k++) begin
            se_cbt[k] += (real'(ones_c[k]) / real'(n) - mean[k]) ** 2;
            se_trd[k] += (real'(ones_t[k]) / real'(n) - mean[k]) ** 2;
          end
        end
        for (int k = 0; k < 3; k++) begin
          real e_c, e_t;
          e_c = $sqrt(se_cbt[k] / RUNS);
          e_t = $sqrt(se_trd[k] / RUNS);
          $display("%0d-input tree, %0d-bit %s LFSR SNs: RMSE CBT %f  conventional %f  reduction %0.1f%%",
                   16 << k, n, corr ? "correlated" : "uncorrelated", e_c, e_t, 100.0 * (1.0 - e_c / e_t));
          check(e_c <= e_t, $sformatf("CBT not more accurate (%0d inputs, %0d bits)", 16 << k, n));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
