// tb_br3d_system: end-to-end test of the whole engine at its default size
// (32 cores), driven through the AXI4-Lite port the way the processor side
// drives it.
//
// The processor model here cuts a line into N equal segments: segment i
// covers points i*K .. i*K+K-1 of the line (K = points / N), and its end
// points are found by rounding A + (B-A)*t/M, with M the line's greatest
// coordinate difference. It writes each segment into one core, starts the
// cores with one write to the start register, waits for Rdy, reads every
// point back through Reg3/Reg4 and compares it with the reference walk.
//
// Runs: the 992-point diagonal line on 32, 4, 2 and 1 cores (the compute
// time, measured from the START write to Rdy less the fixed 2-clock
// overhead, must be 992/N clocks: one point per clock in every core), a long
// skewed line over 32 cores (checked for continuity across segment joins),
// 32 unrelated random segments in both directions, and two full 1024-point
// segments. It counts how often each mechanism happened and fails if one
// never did.
module tb_br3d_system;
  import br3d_pkg::*;
  import br3d_ref_pkg::*;

  localparam int NC = 32;

  logic        clk = 0, rst_n = 0;
  logic [11:0] awaddr = '0, araddr = '0;
  logic        awvalid = 0, wvalid = 0, bready = 0, arvalid = 0, rready = 0;
  logic [31:0] wdata = '0;
  logic        awready, wready, bvalid, arready, rvalid;
  logic [1:0]  bresp, rresp;
  logic [31:0] rdata;
  logic [NC-1:0] core_rdy;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_broadcast = 0;   // starts that launched more than one core together
  int n_subset = 0;      // starts that launched only part of the cores
  int n_axis [3] = '{0, 0, 0};
  int n_negative = 0;    // segments walking down on some axis
  int n_full_seg = 0;    // 1024-point segments (NCP field wraps to 0)
  int n_bstall = 0;      // write responses held under back-pressure
  int n_rstall = 0;      // read responses held under back-pressure
  int n_busy_start = 0;  // start ignored by a busy core

  always #5 clk = ~clk;

  br3d_system dut (
    .clk(clk), .rst_n(rst_n),
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(4'hF), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .core_rdy(core_rdy));

  // Timing probe, from the ports only. START accepted at clock edge s;
  // the cores load at s+1, write points at s+2 .. s+M+2 and set Rdy at
  // s+M+3, so the compute time (point clocks) is (rdy edge - s) - 2.
  int cycle = 0;
  int start_edge = 0;
  always @(posedge clk) cycle <= cycle + 1;
  always @(posedge clk)
    if (awvalid && awready && wvalid && wready && awaddr == 12'h400) start_edge <= cycle;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic axi_write(int a, logic [31:0] d);
    int stall = ($urandom_range(7) == 0) ? 2 : 0;
    @(negedge clk);
    awaddr = 12'(a); awvalid = 1; wdata = d; wvalid = 1;
    #1 while (!(awready && wready)) begin @(negedge clk); #1; end
    @(negedge clk);
    awvalid = 0; wvalid = 0;
    if (stall > 0) n_bstall++;
    repeat (stall) @(negedge clk);
    #1 while (!bvalid) begin @(negedge clk); #1; end
    check(bresp == 2'b00, "BRESP OKAY");
    bready = 1;
    @(negedge clk);
    bready = 0;
  endtask

  task automatic axi_read(int a, output logic [31:0] d);
    int stall = ($urandom_range(7) == 0) ? 2 : 0;
    @(negedge clk);
    araddr = 12'(a); arvalid = 1;
    #1 while (!arready) begin @(negedge clk); #1; end
    @(negedge clk);
    arvalid = 0;
    if (stall > 0) n_rstall++;
    repeat (stall) @(negedge clk);
    #1 while (!rvalid) begin @(negedge clk); #1; end
    check(rresp == 2'b00, "RRESP OKAY");
    d = rdata;
    rready = 1;
    @(negedge clk);
    rready = 0;
  endtask

  function automatic int creg(int c, int r);
    return 32 * c + 4 * r;
  endfunction

  // Rounded point t of the line A..B with greatest difference m.
  function automatic int lerp(int a, int b, int t, int m);
    int d = b - a;
    int num;
    if (m == 0) return a;
    num = 2 * iabs(d) * t + m;
    return a + isign(d) * (num / (2 * m));
  endfunction

  // Segment end points written to the cores, per core: x1,y1,z1,x2,y2,z2.
  int seg [NC][6];

  task automatic load_core(int c, int x1, int y1, int z1, int x2, int y2, int z2);
    seg[c][0] = x1; seg[c][1] = y1; seg[c][2] = z1;
    seg[c][3] = x2; seg[c][4] = y2; seg[c][5] = z2;
    axi_write(creg(c, 0), 32'(pack_pt(x1, y1, z1)));
    axi_write(creg(c, 1), 32'(pack_pt(x2, y2, z2)));
    n_axis[drive_axis(x2 - x1, y2 - y1, z2 - z1)]++;
    if (x2 < x1 || y2 < y1 || z2 < z1) n_negative++;
  endtask

  // Start the cores in `mask`, wait for all their Rdy bits, return the
  // number of clocks in which some core was computing.
  task automatic start_and_wait(logic [NC-1:0] mask, output int compute);
    int guard, rdy_edge;
    if ($countones(mask) > 1) n_broadcast++;
    if (mask != '1) n_subset++;
    axi_write('h400, 32'(mask));
    // Rdy of the started cores clears in the clock after the start and
    // sets at the end; sample every clock from the start on.
    guard = 0;
    rdy_edge = -1;
    while (guard < 5000) begin
      if ((core_rdy & mask) == mask) begin
        rdy_edge = cycle - 1;
        break;
      end
      @(negedge clk);
      guard++;
    end
    check(rdy_edge >= 0, "all started cores become ready");
    compute = rdy_edge - start_edge - 2;
  endtask

  // Read core c's points back; check status and every point against the
  // reference walk of its own end points. Appends the points to `all`.
  task automatic read_core(int c, inout word_q all);
    word_q q;
    logic [31:0] d;
    q = bresenham3d(seg[c][0], seg[c][1], seg[c][2], seg[c][3], seg[c][4], seg[c][5]);
    axi_read(creg(c, 2), d);
    check(d[10] && d[9:0] == 10'(q.size()),
          $sformatf("core %0d status %08h for %0d points", c, d, q.size()));
    if (q.size() == 1024) n_full_seg++;
    for (int i = 0; i < q.size(); i++) begin
      axi_write(creg(c, 3), 32'(i));
      axi_read(creg(c, 4), d);
      check(d == q[i], $sformatf("core %0d point %0d: %08h want %08h", c, i, d, q[i]));
      all.push_back(d);
    end
  endtask

  // Cut line A..B (M+1 points) into n segments on cores 0..n-1, run them.
  task automatic run_line(int ax, int ay, int az, int bx, int by, int bz, int n,
                          output int compute, output word_q all);
    int m, k, s, e;
    m = iabs(bx - ax);
    if (iabs(by - ay) > m) m = iabs(by - ay);
    if (iabs(bz - az) > m) m = iabs(bz - az);
    k = (m + 1) / n;
    for (int c = 0; c < n; c++) begin
      s = c * k;
      e = (c == n - 1) ? m : s + k - 1;
      load_core(c, lerp(ax, bx, s, m), lerp(ay, by, s, m), lerp(az, bz, s, m),
                   lerp(ax, bx, e, m), lerp(ay, by, e, m), lerp(az, bz, e, m));
    end
    start_and_wait(NC'((64'(1) << n) - 1), compute);
    all = {};
    for (int c = 0; c < n; c++) read_core(c, all);
  endtask

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_q all, ref_line;
    int compute;
    int cores [4] = '{32, 4, 2, 1};
    logic [31:0] d;

    repeat (4) @(negedge clk);
    rst_n = 1;

    // 992-point diagonal line, as in the published runs.
    ref_line = bresenham3d(0, 0, 0, 991, 991, 991);
    foreach (cores[i]) begin
      run_line(0, 0, 0, 991, 991, 991, cores[i], compute, all);
      $display("992-point line on %0d cores: %0d compute clocks (%0d ns at 100 MHz)",
               cores[i], compute, compute * 10);
      check(compute == 992 / cores[i],
            $sformatf("%0d cores: %0d compute clocks, want %0d", cores[i], compute, 992 / cores[i]));
      check(all == ref_line, $sformatf("%0d cores: joined segments differ from the whole line", cores[i]));
    end

    // Long skewed line over all cores: every segment right, joins continuous.
    run_line(0, 1023, 17, 1023, 200, 640, NC, compute, all);
    check(compute == 32, $sformatf("skewed line: %0d compute clocks", compute));
    check(all.size() == 1024, "skewed line point count");
    for (int i = 1; i < all.size(); i++) begin
      int dx, dy, dz;
      dx = iabs(int'(all[i] & 'h3FF) - int'(all[i-1] & 'h3FF));
      dy = iabs(int'((all[i] >> 10) & 'h3FF) - int'((all[i-1] >> 10) & 'h3FF));
      dz = iabs(int'((all[i] >> 20) & 'h3FF) - int'((all[i-1] >> 20) & 'h3FF));
      check(dx <= 1 && dy <= 1 && dz <= 1 && (dx + dy + dz) > 0,
            $sformatf("skewed line not continuous at %0d", i));
    end

    // 32 unrelated random segments in one start, every driving axis and direction.
    for (int c = 0; c < NC; c++) begin
      int len, ax, dd;
      int p[3], q[3];
      p = '{$urandom_range(1023), $urandom_range(1023), $urandom_range(1023)};
      len = $urandom_range(60);
      ax = c % 3;
      for (int k = 0; k < 3; k++) begin
        dd = (k == ax) ? len : $urandom_range(len);
        q[k] = (c & (1 << k)) ? p[k] - dd : p[k] + dd;
        if (q[k] < 0) q[k] = p[k] + dd;
        if (q[k] > 1023) q[k] = p[k] - dd;
      end
      load_core(c, p[0], p[1], p[2], q[0], q[1], q[2]);
    end
    start_and_wait('1, compute);
    all = {};
    for (int c = 0; c < NC; c++) read_core(c, all);

    // Full 1024-point segments on two cores; a second start while busy.
    load_core(5, 0, 0, 0, 1023, 1023, 1023);
    load_core(9, 1023, 0, 1023, 0, 1023, 0);
    axi_write('h400, 32'h0000_0220);
    n_broadcast++;
    n_subset++;
    load_core(5, 1, 1, 1, 2, 2, 2);   // new end points while running
    axi_write('h400, 32'h0000_0020);  // ignored: core 5 is busy
    n_busy_start++;
    begin
      int guard;
      guard = 0;
      while ((core_rdy & 32'h220) != 32'h220 && guard < 5000) begin @(negedge clk); guard++; end
    end
    // core 5 must still hold the 1024-point walk, not the later end points
    seg[5] = '{0, 0, 0, 1023, 1023, 1023};
    all = {};
    read_core(5, all);
    read_core(9, all);

    // A read of an address with no register returns zero.
    axi_read('h7FC, d);
    check(d == 0, "unmapped read");

    $display("mechanisms: broadcast=%0d subset=%0d axis x/y/z=%0d/%0d/%0d negative=%0d full_segment=%0d bstall=%0d rstall=%0d busy_start=%0d",
             n_broadcast, n_subset, n_axis[0], n_axis[1], n_axis[2], n_negative,
             n_full_seg, n_bstall, n_rstall, n_busy_start);
    check(n_broadcast > 0, "broadcast start never happened");
    check(n_subset > 0, "partial start never happened");
    check(n_axis[0] > 0 && n_axis[1] > 0 && n_axis[2] > 0, "some driving axis never used");
    check(n_negative > 0, "no downward segment");
    check(n_full_seg >= 2, "no full 1024-point segment");
    check(n_bstall > 0 && n_rstall > 0, "no AXI back-pressure");
    check(n_busy_start > 0, "no start while busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
