// tb_cbt_adder -- self-checking testbench of the 32-input condensed balanced
// tree adder.
//
// Drives random data words and checks every cycle that the output equals the
// data bit addressed by the select word (z == d[sel]), that the select word
// follows the NLFSR sequence modelled here, and that in every window of 32
// cycles each input is selected exactly once. With a constant data word the
// output therefore holds exactly popcount(d) ones per 32 cycles: the tree
// averages its inputs with no sampling error.
module tb_cbt_adder;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, en = 1'b0;
  logic [31:0] d;
  logic [4:0]  sel;
  logic        z;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cbt_adder #(.M(5), .TAPS(5'h14), .SEED(5'h00)) dut (
    .clk(clk), .rst_n(rst_n), .load(load), .en(en), .d(d), .sel(sel), .z(z));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    logic [4:0] m;
    logic f;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    en = 1'b1;
    m = 5'h00;
    for (int w = 0; w < 100; w++) begin
      int cnt [32];
      int ones;
      logic [31:0] dconst;
      dconst = $urandom;
      ones = 0;
      foreach (cnt[k]) cnt[k] = 0;
      for (int i = 0; i < 32; i++) begin
        // random data check
        d = $urandom;
        #1;
        check(sel == m, $sformatf("sel %0d vs model %0d", sel, m));
        check(z == d[sel], $sformatf("z != d[%0d]", sel));
        cnt[sel]++;
        // constant data for the average
        d = dconst;
        #1;
        ones += z;
        @(negedge clk);
        f = m[4] ^ m[2];
        if (m[3:0] == 4'b0) f = ~f;
        m = {m[3:0], f};
      end
      foreach (cnt[k]) check(cnt[k] == 1, $sformatf("input %0d selected %0d times", k, cnt[k]));
      check(ones == $countones(dconst), $sformatf("average %0d vs %0d", ones, $countones(dconst)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
