// br3d_pkg: types and constants shared by the parallel 3D Bresenham engine.
//
// A point is one 32-bit word: x in bits 9:0, y in bits 19:10, z in bits
// 29:20, bits 31:30 unused (written as zero). The 10-bit coordinate width,
// the 32-bit word and the 1024-entry segment memory follow the design's
// stated sizes; the order of the three fields inside the word is this
// design's choice.
//
// The error terms of the Bresenham step range over [-2*M, 2*M] where M is
// at most 1023, so they are held as 13-bit signed values.
package br3d_pkg;

  localparam int unsigned COORD_W   = 10;             // bits per coordinate
  localparam int unsigned WORD_W    = 32;             // bits per stored point / register
  localparam int unsigned SEG_DEPTH = 1024;           // points per segment memory
  localparam int unsigned SEG_AW    = $clog2(SEG_DEPTH);
  localparam int unsigned CNT_W     = SEG_AW + 1;     // holds 0..1024 points
  localparam int unsigned ERR_W     = COORD_W + 3;    // signed error term

  typedef logic [COORD_W-1:0]      coord_t;
  typedef logic signed [ERR_W-1:0] err_t;

  typedef struct packed {
    logic [1:0] unused;
    coord_t     z;
    coord_t     y;
    coord_t     x;
  } point_t;

  // Axis index used for the greatest-difference (driving) axis.
  typedef enum logic [1:0] {
    AXIS_X = 2'd0,
    AXIS_Y = 2'd1,
    AXIS_Z = 2'd2
  } axis_e;

  // Per-axis step description produced by the setup stage.
  typedef struct packed {
    logic   step_neg;   // 1: coordinate decreases along the line
    coord_t absd;       // |end - start| on this axis
  } axis_step_t;

  // Register index inside one core (word offset).
  typedef enum logic [2:0] {
    REG_P1     = 3'd0,  // Reg0: start point P1
    REG_P2     = 3'd1,  // Reg1: end point P2
    REG_STATUS = 3'd2,  // Reg2: bit 10 Rdy, bits 9:0 NCP
    REG_RADDR  = 3'd3,  // Reg3: BRAM read address
    REG_POUT   = 3'd4   // Reg4: point stored at Reg3's address
  } core_reg_e;

  localparam int unsigned RDY_BIT = 10;

  function automatic point_t make_point(coord_t x, coord_t y, coord_t z);
    point_t p;
    p.unused = 2'b00;
    p.x = x;
    p.y = y;
    p.z = z;
    return p;
  endfunction

endpackage
