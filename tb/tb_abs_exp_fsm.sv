// tb_abs_exp_fsm -- self-checking testbench of the absolute-value
// exponentiation FSM (32 states, G = 2).
//
// Feeds Bernoulli input streams of several bipolar values x and checks the
// output bit every cycle against a saturating-counter model written out here
// (output 1 in states 2..29). It also checks that both saturation ends are
// reached and that the long-run output mean approximates exp(-4|x|) within a
// tolerance that covers the FSM's known approximation error, and that `init`
// re-centres the counter.
module tb_abs_exp_fsm;
  logic clk = 1'b0, rst_n = 1'b0, init = 1'b0, en = 1'b0, in_bit = 1'b0;
  logic out_bit;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  abs_exp_fsm #(.STATES(32), .G(2)) dut (
    .clk(clk), .rst_n(rst_n), .init(init), .en(en), .in_bit(in_bit), .out_bit(out_bit));

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

  initial begin : stim
    real xs [7] = '{0.0, 0.1, -0.1, 0.25, -0.4, 0.6, -0.8};
    int m;
    int hit_top = 0, hit_bot = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    foreach (xs[k]) begin
      int ones, len;
      int thr;
      real mean, target, tol;
      @(negedge clk);
      init = 1'b1; en = 1'b1;
      @(negedge clk);
      init = 1'b0;
      m = 16;
      ones = 0; len = 20000;
      thr = int'((xs[k] + 1.0) / 2.0 * 65536.0);
      for (int i = 0; i < len; i++) begin
        in_bit = ($urandom_range(0, 65535) < thr);
        check(out_bit == (m >= 2 && m < 30), $sformatf("x=%f cycle %0d state %0d", xs[k], i, m));
        ones += out_bit;
        @(negedge clk);
        if (in_bit && m < 31) m++;
        else if (!in_bit && m > 0) m--;
        if (m == 31) hit_top++;
        if (m == 0) hit_bot++;
      end
      mean   = real'(ones) / real'(len);
      target = $exp(-4.0 * (xs[k] < 0 ? -xs[k] : xs[k]));
      tol    = 0.16;
      check(mean > target - tol && mean < target + tol,
            $sformatf("x=%f mean %f target %f", xs[k], mean, target));
      $display("x=%5.2f  out mean %6.3f  exp(-4|x|) %6.3f", xs[k], mean, target);
    end
    check(hit_top > 0 && hit_bot > 0, "both saturation ends reached");
    // init re-centres
    en = 1'b1; in_bit = 1'b1;
    repeat (40) @(negedge clk);
    check(out_bit == 1'b0, "pinned at top gives 0");
    init = 1'b1;
    @(negedge clk);
    init = 1'b0; en = 1'b0;
    check(out_bit == 1'b1, "init returns to middle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
