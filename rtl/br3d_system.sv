// br3d_system: programmable-logic side of the parallel 3D Bresenham engine.
//
// A long 3D line is cut by the processor into up to N_CORES segments of
// equal length; each segment's end points are written into one core, all
// cores are started by a single write, every core then produces one point
// of its segment per clock into its own 1024-word block RAM, and the
// processor reads the points back. With all cores busy a line of N_CORES *
// L points takes L clocks instead of N_CORES * L. The number of cores, the
// per-core registers and memory and the AXI4-Lite link follow the design.
//
// Address map (byte addresses on the AXI4-Lite port, 32-bit words):
//   0x000 + 32*c + 4*r   core c (0..N_CORES-1), register r (0..4, see br3d_core)
//   0x400                START: write a bit mask; every core whose bit is 1
//                        starts in the same clock. Reads as 0.
// The start register and this map are this design's choice: the design
// does not say how the cores are launched, only that they run together.
// core_rdy gives each core's Rdy bit as a plain output, so a processor may
// also use it as an interrupt line.
module br3d_system
  import br3d_pkg::*;
#(
  parameter int unsigned N_CORES = 32,
  localparam int unsigned ADDR_W = 12
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [ADDR_W-1:0]  s_axi_awaddr,
  input  logic               s_axi_awvalid,
  output logic               s_axi_awready,
  input  logic [31:0]        s_axi_wdata,
  input  logic [3:0]         s_axi_wstrb,
  input  logic               s_axi_wvalid,
  output logic               s_axi_wready,
  output logic [1:0]         s_axi_bresp,
  output logic               s_axi_bvalid,
  input  logic               s_axi_bready,
  input  logic [ADDR_W-1:0]  s_axi_araddr,
  input  logic               s_axi_arvalid,
  output logic               s_axi_arready,
  output logic [31:0]        s_axi_rdata,
  output logic [1:0]         s_axi_rresp,
  output logic               s_axi_rvalid,
  input  logic               s_axi_rready,
  output logic [N_CORES-1:0] core_rdy
);

  localparam logic [ADDR_W-1:0] START_ADDR = ADDR_W'('h400);

  if (N_CORES < 1 || N_CORES > 32) begin : g_bad_cores
    $error("br3d_system: N_CORES must be 1..32 (one start mask word, 5-bit core index)");
  end

  logic              reg_we;
  logic [ADDR_W-1:0] reg_addr;
  logic [31:0]       reg_wdata;
  logic [31:0]       reg_rdata;

  axil_slave #(
    .ADDR_W (ADDR_W),
    .DATA_W (32)
  ) u_axil (
    .clk           (clk),
    .rst_n         (rst_n),
    .s_axi_awaddr  (s_axi_awaddr),
    .s_axi_awvalid (s_axi_awvalid),
    .s_axi_awready (s_axi_awready),
    .s_axi_wdata   (s_axi_wdata),
    .s_axi_wstrb   (s_axi_wstrb),
    .s_axi_wvalid  (s_axi_wvalid),
    .s_axi_wready  (s_axi_wready),
    .s_axi_bresp   (s_axi_bresp),
    .s_axi_bvalid  (s_axi_bvalid),
    .s_axi_bready  (s_axi_bready),
    .s_axi_araddr  (s_axi_araddr),
    .s_axi_arvalid (s_axi_arvalid),
    .s_axi_arready (s_axi_arready),
    .s_axi_rdata   (s_axi_rdata),
    .s_axi_rresp   (s_axi_rresp),
    .s_axi_rvalid  (s_axi_rvalid),
    .s_axi_rready  (s_axi_rready),
    .reg_we        (reg_we),
    .reg_addr      (reg_addr),
    .reg_wdata     (reg_wdata),
    .reg_rdata     (reg_rdata)
  );

  // Address decode.
  logic       sel_start;
  logic       sel_core_space;
  logic [4:0] core_idx;
  logic [2:0] core_reg;

  assign sel_start      = (reg_addr[ADDR_W-1:2] == START_ADDR[ADDR_W-1:2]);
  assign sel_core_space = (reg_addr[ADDR_W-1:10] == '0);
  assign core_idx       = reg_addr[9:5];
  assign core_reg       = reg_addr[4:2];

  logic [N_CORES-1:0] start_vec;
  logic [31:0]        core_rdata [N_CORES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) start_vec <= '0;
    else        start_vec <= (reg_we && sel_start) ? reg_wdata[N_CORES-1:0] : '0;
  end

  for (genvar c = 0; c < N_CORES; c++) begin : g_core
    logic sel;
    assign sel = sel_core_space && (core_idx == 5'(c));

    br3d_core u_core (
      .clk       (clk),
      .rst_n     (rst_n),
      .start     (start_vec[c]),
      .reg_we    (reg_we && sel),
      .reg_addr  (core_reg),
      .reg_wdata (reg_wdata),
      .reg_rdata (core_rdata[c]),
      .rdy       (core_rdy[c])
    );
  end

  always_comb begin
    reg_rdata = '0;
    if (sel_core_space && (32'(core_idx) < N_CORES)) reg_rdata = core_rdata[core_idx];
  end

endmodule
