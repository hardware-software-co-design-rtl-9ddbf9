// axil_slave: AXI4-Lite slave that turns bus transactions into register
// accesses, one at a time.
//
// A write is accepted when AWVALID and WVALID are both high: AWREADY and
// WREADY rise together in that cycle, reg_we pulses with reg_addr/reg_wdata
// taken straight from the bus, and BVALID (OKAY) follows in the next cycle
// and stays until BREADY. A read is accepted when ARVALID is high and no
// write is pending: reg_addr carries ARADDR in that cycle, reg_rdata is
// captured, and RVALID (OKAY) follows and stays until RREADY. Writes win
// over a read presented in the same cycle. WSTRB is ignored: every write is
// a full 32-bit word, which is all the cores' registers use. The PS to PL
// link being AXI4-Lite follows the design; the single-outstanding slave
// and these timings are this design's choice.
module axil_slave #(
  parameter int unsigned ADDR_W = 12,
  parameter int unsigned DATA_W = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  // AXI4-Lite write address channel
  input  logic [ADDR_W-1:0]   s_axi_awaddr,
  input  logic                s_axi_awvalid,
  output logic                s_axi_awready,
  // write data channel
  input  logic [DATA_W-1:0]   s_axi_wdata,
  input  logic [DATA_W/8-1:0] s_axi_wstrb,
  input  logic                s_axi_wvalid,
  output logic                s_axi_wready,
  // write response channel
  output logic [1:0]          s_axi_bresp,
  output logic                s_axi_bvalid,
  input  logic                s_axi_bready,
  // read address channel
  input  logic [ADDR_W-1:0]   s_axi_araddr,
  input  logic                s_axi_arvalid,
  output logic                s_axi_arready,
  // read data channel
  output logic [DATA_W-1:0]   s_axi_rdata,
  output logic [1:0]          s_axi_rresp,
  output logic                s_axi_rvalid,
  input  logic                s_axi_rready,
  // register side
  output logic                reg_we,
  output logic [ADDR_W-1:0]   reg_addr,
  output logic [DATA_W-1:0]   reg_wdata,
  input  logic [DATA_W-1:0]   reg_rdata
);

  localparam logic [1:0] RESP_OKAY = 2'b00;

  typedef enum logic [1:0] {S_IDLE, S_BRESP, S_RRESP} state_e;
  state_e state;

  logic wr_go, rd_go;

  assign wr_go = (state == S_IDLE) && s_axi_awvalid && s_axi_wvalid;
  assign rd_go = (state == S_IDLE) && s_axi_arvalid && !wr_go;

  assign s_axi_awready = wr_go;
  assign s_axi_wready  = wr_go;
  assign s_axi_arready = rd_go;

  assign reg_we    = wr_go;
  assign reg_addr  = wr_go ? s_axi_awaddr : s_axi_araddr;
  assign reg_wdata = s_axi_wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      s_axi_rdata <= '0;
    end else begin
      case (state)
        S_IDLE: begin
          if (wr_go) begin
            state <= S_BRESP;
          end else if (rd_go) begin
            state       <= S_RRESP;
            s_axi_rdata <= reg_rdata;
          end
        end
        S_BRESP: if (s_axi_bready) state <= S_IDLE;
        S_RRESP: if (s_axi_rready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign s_axi_bvalid = (state == S_BRESP);
  assign s_axi_rvalid = (state == S_RRESP);
  assign s_axi_bresp  = RESP_OKAY;
  assign s_axi_rresp  = RESP_OKAY;

  logic unused_wstrb;
  assign unused_wstrb = ^s_axi_wstrb;

  // AXI rule: a response, once valid, stays valid until it is taken.
  a_bvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi_bvalid && !s_axi_bready |=> s_axi_bvalid);
  a_rvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi_rvalid && !s_axi_rready |=> s_axi_rvalid && $stable(s_axi_rdata));
  // Only one transaction is in flight at a time.
  a_one_at_a_time: assert property (@(posedge clk) disable iff (!rst_n)
    !(s_axi_bvalid && s_axi_rvalid));

endmodule
