// tb_nlfsr -- self-checking testbench of the 5-bit de Bruijn NLFSR.
//
// From the seed it steps two full periods and checks each state against a
// model written out here, that all 32 states (the all-zero one included)
// occur exactly once in every 32 consecutive cycles, that the zero state sits
// between 10000 and 00001, and that `load` and `en` behave.
module tb_nlfsr;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, en = 1'b0;
  logic [4:0] st;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  nlfsr #(.W(5), .TAPS(5'h14), .SEED(5'h00)) dut (
    .clk(clk), .rst_n(rst_n), .load(load), .en(en), .state(st));

  // x^5+x^3+1 LFSR with the zero state spliced in
  function automatic logic [4:0] nxt(logic [4:0] s);
    logic f;
    f = s[4] ^ s[2];
    if (s[3:0] == 4'b0000) f = ~f;
    return {s[3:0], f};
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    logic [4:0] m, prev;
    int cnt [32];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(st == 5'h00, "reset seed");
    m = 5'h00;
    en = 1'b1;
    for (int w = 0; w < 2; w++) begin
      foreach (cnt[k]) cnt[k] = 0;
      for (int i = 0; i < 32; i++) begin
        cnt[st]++;
        prev = st;
        @(negedge clk);
        m = nxt(m);
        check(st == m, $sformatf("state %h vs model %h", st, m));
        if (st == 5'h00) check(prev == 5'h10, "zero state follows 10000");
        if (prev == 5'h00) check(st == 5'h01, "zero state precedes 00001");
      end
      foreach (cnt[k]) check(cnt[k] == 1, $sformatf("window %0d value %0d seen %0d times", w, k, cnt[k]));
    end
    en = 1'b0;
    m = st;
    repeat (3) @(negedge clk);
    check(st == m, "en low holds");
    load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    check(st == 5'h00, "load restores seed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
