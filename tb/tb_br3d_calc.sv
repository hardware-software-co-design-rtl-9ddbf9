// tb_br3d_calc: drives the calculation unit directly. The step descriptors
// and M are computed here (not by the setup stage); after load the unit is
// stepped M times and every point is compared with the reference walk.
// Also checks that the point holds while no step is given.
module tb_br3d_calc;
  import br3d_pkg::*;
  import br3d_ref_pkg::*;

  logic       clk = 0, rst_n = 0;
  logic       load = 0, step = 0;
  point_t     start;
  axis_step_t steps [3];
  coord_t     m;
  point_t     point;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  br3d_calc dut (.clk(clk), .rst_n(rst_n), .load(load), .step(step),
                 .start(start), .steps(steps), .m(m), .point(point));

  task automatic run_line(int x1, int y1, int z1, int x2, int y2, int z2);
    word_q q;
    int d[3], mm;
    q = bresenham3d(x1, y1, z1, x2, y2, z2);
    d[0] = x2 - x1; d[1] = y2 - y1; d[2] = z2 - z1;
    mm = 0;
    for (int k = 0; k < 3; k++) begin
      steps[k].absd     = coord_t'(iabs(d[k]));
      steps[k].step_neg = d[k] < 0;
      if (iabs(d[k]) > mm) mm = iabs(d[k]);
    end
    m     = coord_t'(mm);
    start = make_point(coord_t'(x1), coord_t'(y1), coord_t'(z1));
    @(negedge clk) load = 1;
    @(negedge clk) load = 0;
    for (int i = 0; i <= mm; i++) begin
      checks++;
      if (32'(point) != q[i]) begin
        failures++;
        $display("FAIL point %0d: got %08h want %08h", i, point, q[i]);
      end
      if (i == mm / 2) begin
        // a cycle without step: the point must not move
        @(negedge clk);
        checks++;
        if (32'(point) != q[i]) begin
          failures++;
          $display("FAIL hold at %0d", i);
        end
      end
      if (i < mm) begin
        step = 1;
        @(negedge clk) step = 0;
      end
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_line(3, 2, 5, 12, 15, 20);
    run_line(12, 15, 20, 3, 2, 5);
    run_line(0, 0, 0, 1023, 700, 12);
    run_line(900, 10, 400, 100, 1000, 300);
    run_line(7, 7, 7, 7, 7, 7);
    for (int i = 0; i < 40; i++)
      run_line($urandom_range(1023), $urandom_range(1023), $urandom_range(1023),
               $urandom_range(1023), $urandom_range(1023), $urandom_range(1023));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
