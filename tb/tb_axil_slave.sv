// tb_axil_slave: an AXI4-Lite master drives the slave, which is connected
// to a small register file held in this testbench. Checks writes with
// address and data presented together, address first or data first, reads,
// held responses under BREADY/RREADY back-pressure, write priority when a
// read and a write arrive together, and that reg_we pulses exactly once
// per write.
module tb_axil_slave;
  localparam int AW = 12;

  logic          clk = 0, rst_n = 0;
  logic [AW-1:0] awaddr = '0, araddr = '0;
  logic          awvalid = 0, wvalid = 0, bready = 0, arvalid = 0, rready = 0;
  logic [31:0]   wdata = '0;
  logic          awready, wready, bvalid, arready, rvalid;
  logic [1:0]    bresp, rresp;
  logic [31:0]   rdata;
  logic          reg_we;
  logic [AW-1:0] reg_addr;
  logic [31:0]   reg_wdata, reg_rdata;
  logic [31:0]   regs [16];
  int we_count = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  axil_slave #(.ADDR_W(AW), .DATA_W(32)) dut (
    .clk(clk), .rst_n(rst_n),
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(4'hF), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .reg_we(reg_we), .reg_addr(reg_addr), .reg_wdata(reg_wdata), .reg_rdata(reg_rdata));

  assign reg_rdata = regs[reg_addr[5:2]];
  always_ff @(posedge clk) begin
    if (reg_we) begin
      regs[reg_addr[5:2]] <= reg_wdata;
      we_count <= we_count + 1;
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // order: 0 together, 1 address first, 2 data first; bstall: cycles BREADY low
  task automatic axi_write(int a, logic [31:0] d, int order, int bstall);
    int n0 = we_count;
    @(negedge clk);
    if (order != 2) begin awaddr = AW'(a); awvalid = 1; end
    if (order != 1) begin wdata = d; wvalid = 1; end
    if (order != 0) begin
      repeat (2) begin
        @(negedge clk);
        check(!awready && !wready, "no handshake with one channel only");
      end
      awaddr = AW'(a); awvalid = 1; wdata = d; wvalid = 1;
    end
    #1 while (!(awready && wready)) begin @(negedge clk); #1; end
    @(negedge clk);
    awvalid = 0; wvalid = 0;
    repeat (bstall) begin
      check(bvalid, "BVALID held under back-pressure");
      @(negedge clk);
    end
    check(bvalid && bresp == 2'b00, "write response");
    bready = 1;
    @(negedge clk);
    bready = 0;
    check(!bvalid, "BVALID drops after BREADY");
    check(we_count == n0 + 1, "one register write per transaction");
  endtask

  task automatic axi_read(int a, output logic [31:0] d, input int rstall);
    @(negedge clk);
    araddr = AW'(a); arvalid = 1;
    #1 while (!arready) begin @(negedge clk); #1; end
    @(negedge clk);
    arvalid = 0;
    repeat (rstall) begin
      check(rvalid, "RVALID held under back-pressure");
      @(negedge clk);
    end
    check(rvalid && rresp == 2'b00, "read response");
    d = rdata;
    rready = 1;
    @(negedge clk);
    rready = 0;
    check(!rvalid, "RVALID drops after RREADY");
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] model [16];
    logic [31:0] d;
    for (int i = 0; i < 16; i++) begin regs[i] = '0; model[i] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 60; i++) begin
      int r;
      logic [31:0] v;
      r = $urandom_range(15);
      v = $urandom;
      axi_write(4 * r, v, i % 3, $urandom_range(3));
      model[r] = v;
      r = $urandom_range(15);
      axi_read(4 * r, d, $urandom_range(3));
      check(d == model[r], $sformatf("read reg %0d: %08h want %08h", r, d, model[r]));
    end
    // read and write presented together: the write goes first
    @(negedge clk);
    awaddr = 12'h8; awvalid = 1; wdata = 32'hA5A5_0001; wvalid = 1;
    araddr = 12'h8; arvalid = 1;
    #1 check(awready && wready && !arready, "write wins over read");
    @(negedge clk);
    awvalid = 0; wvalid = 0;
    bready = 1;
    @(negedge clk);
    bready = 0;
    #1 while (!arready) begin @(negedge clk); #1; end
    @(negedge clk);
    arvalid = 0;
    check(rvalid && rdata == 32'hA5A5_0001, "read after simultaneous write sees new data");
    rready = 1;
    @(negedge clk);
    rready = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
