// tb_br3d_setup: checks the setup stage (differences, magnitudes, step
// directions, driving axis and M) against values computed here, over
// directed corner cases and random end points.
module tb_br3d_setup;
  import br3d_pkg::*;
  import br3d_ref_pkg::*;

  point_t     p1, p2;
  axis_step_t steps [3];
  axis_e      major;
  coord_t     m;
  int checks = 0, failures = 0;

  br3d_setup dut (.p1(p1), .p2(p2), .steps(steps), .major(major), .m(m));

  task automatic check_one(int x1, int y1, int z1, int x2, int y2, int z2);
    int a[3], d[3], exp_drv, exp_m;
    p1 = make_point(coord_t'(x1), coord_t'(y1), coord_t'(z1));
    p2 = make_point(coord_t'(x2), coord_t'(y2), coord_t'(z2));
    #1;
    d[0] = x2 - x1; d[1] = y2 - y1; d[2] = z2 - z1;
    for (int k = 0; k < 3; k++) a[k] = iabs(d[k]);
    exp_drv = drive_axis(d[0], d[1], d[2]);
    exp_m   = a[exp_drv];
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (int'(steps[k].absd) != a[k] || steps[k].step_neg != (d[k] < 0)) begin
        failures++;
        $display("FAIL axis %0d: %0d,%0d,%0d -> %0d,%0d,%0d absd=%0d neg=%0d", k,
                 x1, y1, z1, x2, y2, z2, steps[k].absd, steps[k].step_neg);
      end
    end
    checks++;
    if (int'(major) != exp_drv || int'(m) != exp_m) begin
      failures++;
      $display("FAIL major/m: got %0d/%0d want %0d/%0d", major, m, exp_drv, exp_m);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one(3, 2, 5, 12, 15, 20);
    check_one(0, 0, 0, 1023, 1023, 1023);
    check_one(1023, 0, 512, 0, 1023, 511);
    check_one(5, 5, 5, 5, 5, 5);
    check_one(10, 20, 30, 30, 10, 20);
    check_one(0, 100, 0, 0, 0, 0);
    check_one(0, 0, 900, 0, 0, 1);
    for (int i = 0; i < 2000; i++)
      check_one($urandom_range(1023), $urandom_range(1023), $urandom_range(1023),
                $urandom_range(1023), $urandom_range(1023), $urandom_range(1023));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
