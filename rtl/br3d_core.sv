// br3d_core: one line-segment core of the parallel Bresenham engine.
//
// Registers seen from the bus (32-bit words, index = word offset):
//   Reg0 P1      read/write  start point of the segment (x 9:0, y 19:10, z 29:20)
//   Reg1 P2      read/write  end point of the segment
//   Reg2 STATUS  read only   bit 10 Rdy, bits 9:0 NCP (number of points computed)
//   Reg3 RADDR   read/write  address of the point to read back
//   Reg4 P_OUT   read only   point stored at address Reg3
// The register set, the Rdy/NCP layout and read-back through Reg3/Reg4
// follow the design. A `start` strobe (shared by all cores, from the
// system's start register) launches the BR3D unit on Reg0/Reg1; Rdy clears
// on start and sets when the last point has been written. NCP is a 10-bit
// field, so a full 1024-point segment reads back as NCP = 0 with Rdy set
// (this design's reading of a 10-bit field for up to 1024 points).
//
// Timing: with start sampled at clock edge 0, the points are written at
// edges 1..M+1 and Rdy is set at edge M+2.
//
// Bus side: reg_we/reg_addr/reg_wdata write in one cycle; reg_rdata is a
// combinational function of reg_addr. Reg4 reflects a Reg3 write one clock
// later (registered block-RAM read), which any bus transaction covers.
module br3d_core
  import br3d_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              reg_we,
  input  logic [2:0]        reg_addr,
  input  logic [WORD_W-1:0] reg_wdata,
  output logic [WORD_W-1:0] reg_rdata,
  output logic              rdy
);

  point_t              p1_q, p2_q;
  logic [SEG_AW-1:0]   raddr_q;
  logic                rdy_q;
  logic [CNT_W-1:0]    npts;
  logic                busy, done;
  logic                wr_en;
  logic [SEG_AW-1:0]   wr_addr;
  point_t              wr_data;
  logic [WORD_W-1:0]   rd_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p1_q    <= '0;
      p2_q    <= '0;
      raddr_q <= '0;
      rdy_q   <= 1'b0;
    end else begin
      if (reg_we) begin
        case (reg_addr)
          REG_P1:    p1_q    <= point_t'({2'b00, reg_wdata[3*COORD_W-1:0]});
          REG_P2:    p2_q    <= point_t'({2'b00, reg_wdata[3*COORD_W-1:0]});
          REG_RADDR: raddr_q <= reg_wdata[SEG_AW-1:0];
          default: ;
        endcase
      end
      if (start && !busy) rdy_q <= 1'b0;
      else if (done)      rdy_q <= 1'b1;
    end
  end

  br3d u_br3d (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (start),
    .p1      (p1_q),
    .p2      (p2_q),
    .busy    (busy),
    .done    (done),
    .npts    (npts),
    .wr_en   (wr_en),
    .wr_addr (wr_addr),
    .wr_data (wr_data)
  );

  point_bram #(
    .DEPTH (SEG_DEPTH),
    .WIDTH (WORD_W)
  ) u_bram (
    .clk     (clk),
    .wr_en   (wr_en),
    .wr_addr (wr_addr),
    .wr_data (wr_data),
    .rd_addr (raddr_q),
    .rd_data (rd_data)
  );

  always_comb begin
    reg_rdata = '0;
    case (reg_addr)
      REG_P1:     reg_rdata = p1_q;
      REG_P2:     reg_rdata = p2_q;
      REG_STATUS: reg_rdata = {{(WORD_W-RDY_BIT-1){1'b0}}, rdy_q, npts[SEG_AW-1:0]};
      REG_RADDR:  reg_rdata = {{(WORD_W-SEG_AW){1'b0}}, raddr_q};
      REG_POUT:   reg_rdata = rd_data;
      default:    reg_rdata = '0;
    endcase
  end

  assign rdy = rdy_q;

endmodule
