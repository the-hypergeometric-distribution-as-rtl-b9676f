// tb_lfsr -- self-checking testbench of the maximum-period LFSR.
//
// Runs both default LFSRs of the KDE (pixel and select polynomials) from their
// seeds and checks, against a bit-level model written out here, every state
// of a full period: no zero state, no state repeated, and return to the seed
// after exactly 2^8-1 = 255 steps. Also checks that `en` low holds the state
// and that `load` restarts at the seed.
module tb_lfsr;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, en = 1'b0;
  logic [7:0] st_pix, st_sel;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lfsr #(.W(8), .TAPS(8'hB8), .SEED(8'h01)) dut_pix (
    .clk(clk), .rst_n(rst_n), .load(load), .en(en), .state(st_pix));
  lfsr #(.W(8), .TAPS(8'hB4), .SEED(8'h5A)) dut_sel (
    .clk(clk), .rst_n(rst_n), .load(load), .en(en), .state(st_sel));

  function automatic logic [7:0] nxt_pix(logic [7:0] s);  // x^8+x^6+x^5+x^4+1
    return {s[6:0], s[7] ^ s[5] ^ s[4] ^ s[3]};
  endfunction
  function automatic logic [7:0] nxt_sel(logic [7:0] s);  // x^8+x^6+x^5+x^3+1
    return {s[6:0], s[7] ^ s[5] ^ s[4] ^ s[2]};
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    logic [7:0] m_pix, m_sel;
    bit seen_pix [256];
    bit seen_sel [256];
    int period_pix, period_sel;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(st_pix == 8'h01 && st_sel == 8'h5A, "reset loads seeds");
    m_pix = 8'h01; m_sel = 8'h5A;
    period_pix = 0; period_sel = 0;
    en = 1'b1;
    for (int i = 1; i <= 255; i++) begin
      seen_pix[st_pix] = 1'b1;
      seen_sel[st_sel] = 1'b1;
      @(negedge clk);
      m_pix = nxt_pix(m_pix);
      m_sel = nxt_sel(m_sel);
      check(st_pix == m_pix, $sformatf("pix state step %0d: %h vs %h", i, st_pix, m_pix));
      check(st_sel == m_sel, $sformatf("sel state step %0d: %h vs %h", i, st_sel, m_sel));
      check(st_pix != 0 && st_sel != 0, "never the zero state");
      if (st_pix == 8'h01 && period_pix == 0) period_pix = i;
      if (st_sel == 8'h5A && period_sel == 0) period_sel = i;
    end
    check(period_pix == 255, $sformatf("pix period %0d", period_pix));
    check(period_sel == 255, $sformatf("sel period %0d", period_sel));
    begin
      int n_pix = 0, n_sel = 0;
      for (int v = 1; v < 256; v++) begin
        n_pix += seen_pix[v];
        n_sel += seen_sel[v];
      end
      check(n_pix == 255 && n_sel == 255, "all 255 nonzero states visited");
    end
    // hold
    repeat (7) @(negedge clk);
    en = 1'b0;
    m_pix = st_pix;
    repeat (3) @(negedge clk);
    check(st_pix == m_pix, "en low holds state");
    // load
    en = 1'b1; load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    check(st_pix == 8'h01 && st_sel == 8'h5A, "load restores seeds");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
