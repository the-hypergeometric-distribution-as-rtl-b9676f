// tb_cam_subtractor -- self-checking testbench of the CAM subtractor.
//
// For random pixel pairs it runs one full 255-state LFSR period (model in the
// testbench), forms X = (R < Bx) as the shared X SNG would, and checks the
// output bit every cycle against sel ? X : ~(~R < By). Over the period it also
// checks the stream statistics the CAM structure guarantees: with sel held at
// 0 the output holds exactly 255 - By ones, and the mux data inputs X and ~Y
// disagree in exactly |(Bx-1) - (255-By)| cycles (maximal overlap).
module tb_cam_subtractor;
  logic [7:0] r, b_y;
  logic x_bit, sel, z;
  int checks = 0, failures = 0;

  cam_subtractor #(.W(8)) dut (.r(r), .b_y(b_y), .x_bit(x_bit), .sel(sel), .z(z));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    #20ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    for (int trial = 0; trial < 60; trial++) begin
      logic [7:0] s, bx;
      int ones_sel0, differ, yinv;
      bx  = (trial < 4) ? 8'(trial * 80) : 8'($urandom_range(0, 255));
      b_y = (trial < 4) ? 8'(255 - trial * 60) : 8'($urandom_range(0, 255));
      s = 8'h01;
      ones_sel0 = 0; differ = 0;
      for (int i = 0; i < 255; i++) begin
        r = s;
        x_bit = (s < bx);
        yinv = ((255 - int'(s)) < int'(b_y)) ? 0 : 1;   // inverted Y-SNG bit
        // pass 1: random select, per-bit check
        sel = 1'($urandom);
        #1;
        check(z == (sel ? x_bit : 1'(yinv)),
              $sformatf("bit r=%0d bx=%0d by=%0d sel=%0d", s, bx, b_y, sel));
        // pass 2: select 0 for statistics
        sel = 1'b0;
        #1;
        ones_sel0 += z;
        if (x_bit != 1'(yinv)) differ++;
        s = {s[6:0], s[7] ^ s[5] ^ s[4] ^ s[3]};
      end
      begin
        int nx, ny, d;
        nx = (bx == 0) ? 0 : int'(bx) - 1;
        ny = 255 - int'(b_y);
        d  = (nx > ny) ? nx - ny : ny - nx;
        check(ones_sel0 == 255 - int'(b_y), $sformatf("~Y ones %0d by=%0d", ones_sel0, b_y));
        check(differ == d, $sformatf("overlap: differ %0d expected %0d (bx=%0d by=%0d)",
                                     differ, d, bx, b_y));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
