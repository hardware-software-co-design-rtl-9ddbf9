// tb_br3d: runs whole segments through the BR3D unit. Every memory write
// is compared with the reference walk (address and point), and the timing
// is checked: start in cycle 0, one write per cycle in cycles 1..M+1, done
// in cycle M+2 with npts = M+1. A start while busy must be ignored.
module tb_br3d;
  import br3d_pkg::*;
  import br3d_ref_pkg::*;

  logic              clk = 0, rst_n = 0;
  logic              start = 0;
  point_t            p1, p2;
  logic              busy, done, wr_en;
  logic [CNT_W-1:0]  npts;
  logic [SEG_AW-1:0] wr_addr;
  point_t            wr_data;
  int checks = 0, failures = 0;
  int cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  br3d dut (.clk(clk), .rst_n(rst_n), .start(start), .p1(p1), .p2(p2),
            .busy(busy), .done(done), .npts(npts),
            .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run_line(int x1, int y1, int z1, int x2, int y2, int z2, bit poke_start);
    word_q q;
    int n, t0;
    q  = bresenham3d(x1, y1, z1, x2, y2, z2);
    p1 = make_point(coord_t'(x1), coord_t'(y1), coord_t'(z1));
    p2 = make_point(coord_t'(x2), coord_t'(y2), coord_t'(z2));
    @(negedge clk) start = 1;
    t0 = cycle;
    @(negedge clk) start = 0;
    n = 0;
    while (!done) begin
      if (wr_en) begin
        check(int'(wr_addr) == n, $sformatf("address %0d vs %0d", wr_addr, n));
        check(n < q.size() && 32'(wr_data) == q[n],
              $sformatf("point %0d: %08h", n, wr_data));
        check(cycle - t0 == n + 1, $sformatf("write %0d at cycle %0d", n, cycle - t0));
        n++;
      end
      if (poke_start && n == 2) begin
        // a second start while busy, with other end points, must be ignored
        p1 = make_point(1, 2, 3);
        p2 = make_point(4, 5, 6);
        start = 1;
      end else begin
        start = 0;
      end
      @(negedge clk);
    end
    check(n == q.size(), $sformatf("wrote %0d points, want %0d", n, q.size()));
    check(int'(npts) == q.size(), $sformatf("npts %0d want %0d", npts, q.size()));
    check(cycle - t0 == q.size() + 1, $sformatf("done at cycle %0d for %0d points",
                                                cycle - t0, q.size()));
    check(!busy, "busy after done");
    @(negedge clk);
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    p1 = '0; p2 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_line(3, 2, 5, 12, 15, 20, 0);
    run_line(12, 15, 20, 3, 2, 5, 1);
    run_line(0, 0, 0, 1023, 1023, 1023, 0);
    run_line(0, 0, 0, 30, 30, 30, 0);
    run_line(512, 512, 512, 512, 512, 512, 0);
    run_line(100, 900, 3, 600, 0, 1000, 0);
    for (int i = 0; i < 30; i++)
      run_line($urandom_range(1023), $urandom_range(1023), $urandom_range(1023),
               $urandom_range(1023), $urandom_range(1023), $urandom_range(1023), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
