// point_bram: dual-port block RAM that stores the points of one segment.
//
// Port A is the write port driven by the BR3D unit (one point per clock).
// Port B is the read port used by the bus side: the word at rd_addr
// appears on rd_data one clock later (registered read, as a block RAM
// does). Both ports share one clock. Depth 1024 x 32 bits follows the
// design's segment memory; a read-only B port (rather than two read/write
// ports) is this design's choice, since nothing else writes the memory.
module point_bram #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    rd_data <= mem[rd_addr];
  end

endmodule
