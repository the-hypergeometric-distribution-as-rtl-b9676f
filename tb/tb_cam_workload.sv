// tb_cam_workload -- accuracy workload of the CAM subtractor.
//
// Sweeps X and Y over a uniform grid of 8-bit values (all pairs equally
// likely). For each pair one full 255-cycle LFSR period is run, with the
// select stream S ~ 0.5 taken from a second LFSR whose seed is random per
// pair. The CAM subtractor's output value is compared with
// 0.5*X + 0.5*(1-Y) computed from the exact 1-counts of its two data streams,
// so quantization is excluded and only the select-induced error remains. The
// same streams are fed to the original subtractor modelled here, whose Y
// comparator sees the plain LFSR state. Every cycle the CAM output is checked
// bit-exactly; at the end the CAM RMS error must be below the original's and
// the reduction is printed.
module tb_cam_workload;
  localparam int STEP = 1;    // grid step of X and Y: every pair

  logic [7:0] r, b_y;
  logic x_bit, sel, z;
  int checks = 0, failures = 0;

  cam_subtractor dut (.r(r), .b_y(b_y), .x_bit(x_bit), .sel(sel), .z(z));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    #1s;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    real se_cam, se_org;
    int pairs;
    se_cam = 0.0; se_org = 0.0; pairs = 0;
    for (int bx = 1; bx < 256; bx += STEP) begin
      for (int by = 1; by < 256; by += STEP) begin
        logic [7:0] s, ss;
        int z_cam, z_org, n_x, n_yc, n_yo;
        s  = 8'h01;
        ss = 8'($urandom_range(1, 255));
        z_cam = 0; z_org = 0; n_x = 0; n_yc = 0; n_yo = 0;
        b_y = 8'(by);
        for (int i = 0; i < 255; i++) begin
          logic yc, yo, zo;
          r     = s;
          x_bit = (int'(s) < bx);
          sel   = (ss < 8'd128);
          yc    = ~((~s) < b_y);         // CAM: inverted state, then inverter
          yo    = ~(s < b_y);            // original: plain state, then inverter
          zo    = sel ? x_bit : yo;
          #1;
          check(z == (sel ? x_bit : yc), "CAM output bit");
          z_cam += z;
          z_org += zo;
          n_x   += x_bit;
          n_yc  += yc;
          n_yo  += yo;
          s  = {s[6:0], s[7] ^ s[5] ^ s[4] ^ s[3]};
          ss = {ss[6:0], ss[7] ^ ss[5] ^ ss[4] ^ ss[2]};
        end
        // bipolar error against the mean of the two actual data streams
        se_cam += (2.0 * (real'(z_cam) - 0.5 * real'(n_x + n_yc)) / 255.0) ** 2;
        se_org += (2.0 * (real'(z_org) - 0.5 * real'(n_x + n_yo)) / 255.0) ** 2;
        pairs++;
      end
    end
    begin
      real e_c, e_o;
      e_c = $sqrt(se_cam / pairs);
      e_o = $sqrt(se_org / pairs);
      $display("%0d pairs: RMSE CAM subtractor %f  original %f  reduction %0.1f%%",
               pairs, e_c, e_o, 100.0 * (1.0 - e_c / e_o));
      check(e_c < e_o, "CAM subtractor more accurate than the original");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
