// br3d_setup: combinational front end of the BR3D line unit.
//
// For a segment from P1 to P2 it forms, per axis, the signed difference
// P2 - P1 (three subtractors), its magnitude (three ABS units) and the step
// direction. Three magnitude comparators (|dx|>=|dy|, |dx|>=|dz|,
// |dy|>=|dz|) pick the axis with the greatest difference, and a multiplexer
// passes that axis' magnitude out as M, the number of Bresenham steps; the
// segment then holds M+1 points. This is the structure of the unit's front
// end as the design describes it. Ties go to x, then y (this design's
// choice; the tie order does not change which points are produced).
//
// Interface: p1, p2 in; steps[0..2] (x, y, z), major and m out. Purely
// combinational; the calculation unit samples the outputs on its load cycle.
module br3d_setup
  import br3d_pkg::*;
(
  input  point_t     p1,
  input  point_t     p2,
  output axis_step_t steps [3],
  output axis_e      major,
  output coord_t     m
);

  coord_t a [3];
  coord_t b [3];

  assign a[0] = p1.x;
  assign a[1] = p1.y;
  assign a[2] = p1.z;
  assign b[0] = p2.x;
  assign b[1] = p2.y;
  assign b[2] = p2.z;

  // Subtractors and ABS units.
  for (genvar k = 0; k < 3; k++) begin : g_axis
    logic signed [COORD_W:0] diff;
    always_comb begin
      diff = $signed({1'b0, b[k]}) - $signed({1'b0, a[k]});
      steps[k].step_neg = diff[COORD_W];
      steps[k].absd     = diff[COORD_W] ? coord_t'(-diff) : coord_t'(diff);
    end
  end

  // Comparators and the greatest-difference multiplexer.
  logic x_ge_y, x_ge_z, y_ge_z;
  always_comb begin
    x_ge_y = steps[0].absd >= steps[1].absd;
    x_ge_z = steps[0].absd >= steps[2].absd;
    y_ge_z = steps[1].absd >= steps[2].absd;
    if (x_ge_y && x_ge_z) major = AXIS_X;
    else if (y_ge_z)      major = AXIS_Y;
    else                  major = AXIS_Z;
    case (major)
      AXIS_X:  m = steps[0].absd;
      AXIS_Y:  m = steps[1].absd;
      default: m = steps[2].absd;
    endcase
  end

endmodule
