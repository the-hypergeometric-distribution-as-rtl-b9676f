// tb_sng -- self-checking testbench of the comparator SNG.
//
// Exhaustively applies every (R, B) pair of the 8-bit comparator, in plain and
// in inverted-state (CAM) form, and checks the bit against R < B and ~R < B.
// Then, for a sweep of B, counts the 1s over the 255 nonzero LFSR states and
// checks the exact counts B-1 (plain) and B (inverted): an LFSR SN carries no
// variance in its value.
module tb_sng;
  logic [7:0] r, b;
  logic bit_p, bit_i;
  int checks = 0, failures = 0;

  sng #(.W(8), .INVERT_R(1'b0)) dut_p (.r(r), .b(b), .bit_out(bit_p));
  sng #(.W(8), .INVERT_R(1'b1)) dut_i (.r(r), .b(b), .bit_out(bit_i));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    #10ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    for (int bv = 0; bv < 256; bv++) begin
      int ones_p, ones_i;
      ones_p = 0; ones_i = 0;
      for (int rv = 0; rv < 256; rv++) begin
        r = rv[7:0]; b = bv[7:0];
        #1;
        check(bit_p == (rv < bv), $sformatf("plain r=%0d b=%0d", rv, bv));
        check(bit_i == ((255 - rv) < bv), $sformatf("inverted r=%0d b=%0d", rv, bv));
        if (rv != 0) begin
          ones_p += bit_p;
          ones_i += bit_i;
        end
      end
      check(ones_p == (bv == 0 ? 0 : bv - 1), $sformatf("plain count b=%0d: %0d", bv, ones_p));
      check(ones_i == bv, $sformatf("inverted count b=%0d: %0d", bv, ones_i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
