// tb_point_bram: writes a generated pattern through port A, reads it back
// through port B and checks the data and the one-clock read latency, and
// that a write with wr_en low changes nothing.
module tb_point_bram;
  logic        clk = 0;
  logic        wr_en = 0;
  logic [9:0]  wr_addr = '0, rd_addr = '0;
  logic [31:0] wr_data = '0, rd_data;
  logic [31:0] model [1024];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  point_bram dut (.clk(clk), .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data),
                  .rd_addr(rd_addr), .rd_data(rd_data));

  function automatic logic [31:0] pattern(int a, int salt);
    return 32'(a * 32'h9E3779B1) ^ 32'(salt);
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 10'(a); wr_data = pattern(a, 0); model[a] = pattern(a, 0);
    end
    // writes with enable low must be ignored
    for (int a = 0; a < 1024; a += 7) begin
      @(negedge clk);
      wr_en = 0; wr_addr = 10'(a); wr_data = pattern(a, 1);
    end
    @(negedge clk) wr_en = 0;
    for (int a = 0; a < 1024; a++) begin
      rd_addr = 10'(1023 - a);
      @(negedge clk);
      checks++;
      if (rd_data != model[1023 - a]) begin
        failures++;
        $display("FAIL addr %0d: %08h want %08h", 1023 - a, rd_data, model[1023 - a]);
      end
    end
    // latency: data for a new address must not be visible before the clock
    rd_addr = 10'd5;
    @(negedge clk);
    rd_addr = 10'd6;
    #1;
    checks++;
    if (rd_data != model[5]) begin failures++; $display("FAIL latency"); end
    @(negedge clk);
    checks++;
    if (rd_data != model[6]) begin failures++; $display("FAIL latency 2"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
