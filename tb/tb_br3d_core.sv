// tb_br3d_core: programs one core through its register port. For each
// segment: write Reg0/Reg1, pulse start, poll Reg2 until Rdy, check NCP and
// the cycle count (start sampled at edge 0, points at edges 1..M+1, Rdy
// set at edge M+2), then read every point
// back by writing Reg3 and reading Reg4 and compare with the reference
// walk. Also checks register read-back, that Rdy clears on start, and the
// NCP field of a full 1024-point segment.
module tb_br3d_core;
  import br3d_pkg::*;
  import br3d_ref_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        start = 0;
  logic        reg_we = 0;
  logic [2:0]  reg_addr = '0;
  logic [31:0] reg_wdata = '0, reg_rdata;
  logic        rdy;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  br3d_core dut (.clk(clk), .rst_n(rst_n), .start(start), .reg_we(reg_we),
                 .reg_addr(reg_addr), .reg_wdata(reg_wdata), .reg_rdata(reg_rdata),
                 .rdy(rdy));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(int r, logic [31:0] d);
    @(negedge clk);
    reg_we = 1; reg_addr = 3'(r); reg_wdata = d;
    @(negedge clk);
    reg_we = 0;
  endtask

  task automatic rd(int r, output logic [31:0] d);
    reg_addr = 3'(r);
    #1 d = reg_rdata;
  endtask

  task automatic run_seg(int x1, int y1, int z1, int x2, int y2, int z2);
    word_q q;
    logic [31:0] d;
    int cyc;
    q = bresenham3d(x1, y1, z1, x2, y2, z2);
    wr(0, 32'(pack_pt(x1, y1, z1)) | 32'hC000_0000);   // unused bits must be dropped
    wr(1, 32'(pack_pt(x2, y2, z2)));
    rd(0, d); check(d == 32'(pack_pt(x1, y1, z1)), "Reg0 read-back");
    rd(1, d); check(d == 32'(pack_pt(x2, y2, z2)), "Reg1 read-back");
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    rd(2, d); check(d[10] == 1'b0, "Rdy clears on start");
    cyc = 1;
    while (!rdy) begin @(negedge clk); cyc++; end
    check(cyc == q.size() + 2, $sformatf("Rdy after %0d clocks for %0d points", cyc, q.size()));
    rd(2, d);
    check(d[10] == 1'b1 && d[9:0] == 10'(q.size()) && d[31:11] == '0,
          $sformatf("status %08h for %0d points", d, q.size()));
    for (int i = 0; i < q.size(); i++) begin
      wr(3, 32'(i));
      rd(3, d); check(d == 32'(i), "Reg3 read-back");
      @(negedge clk);   // block-RAM read latency
      rd(4, d); check(d == q[i], $sformatf("point %0d: %08h want %08h", i, d, q[i]));
    end
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    repeat (3) @(negedge clk);
    rst_n = 1;
    rd(2, d); check(d == 0, "status after reset");
    run_seg(3, 2, 5, 12, 15, 20);
    run_seg(0, 0, 0, 30, 30, 30);
    run_seg(1000, 3, 500, 20, 800, 600);
    run_seg(0, 0, 0, 1023, 1023, 1023);
    run_seg(9, 9, 9, 9, 9, 9);
    for (int i = 0; i < 5; i++)
      run_seg($urandom_range(1023), $urandom_range(1023), $urandom_range(1023),
              $urandom_range(1023), $urandom_range(1023), $urandom_range(1023));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
