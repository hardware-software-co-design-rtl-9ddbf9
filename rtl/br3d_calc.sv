// br3d_calc: calculation unit of the BR3D line unit.
//
// Holds the current point and one error term per axis. On `load` it takes
// the start point and initialises each axis' error to 2*|d| - M, where |d|
// is that axis' difference and M the greatest one. On every `step` each
// axis whose error is non-negative moves one unit in its direction and
// subtracts 2*M from its error, and every axis adds 2*|d|. For the driving
// axis |d| = M, so its error stays at M >= 0 and it moves on every step;
// the other two axes move when their accumulated error crosses zero. This
// is the integer-only 3D Bresenham recurrence; handling all three axes with
// the same rule, instead of permuting them so that the driving axis comes
// first, is this design's choice and gives the same points.
//
// Interface: load and step are single-cycle strobes (load wins); `point`
// is the registered current point and is valid from the cycle after load.
// One step per clock.
module br3d_calc
  import br3d_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  logic       step,
  input  point_t     start,
  input  axis_step_t steps [3],
  input  coord_t     m,
  output point_t     point
);

  coord_t cur  [3];
  err_t   err  [3];
  err_t   inc  [3];   // 2*|d| per axis
  err_t   dec;        // 2*M
  logic   neg  [3];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 3; k++) begin
        cur[k] <= '0;
        err[k] <= '0;
        inc[k] <= '0;
        neg[k] <= 1'b0;
      end
      dec <= '0;
    end else if (load) begin
      cur[0] <= start.x;
      cur[1] <= start.y;
      cur[2] <= start.z;
      for (int k = 0; k < 3; k++) begin
        inc[k] <= err_t'({steps[k].absd, 1'b0});
        err[k] <= err_t'({steps[k].absd, 1'b0}) - err_t'(m);
        neg[k] <= steps[k].step_neg;
      end
      dec <= err_t'({m, 1'b0});
    end else if (step) begin
      for (int k = 0; k < 3; k++) begin
        if (!err[k][ERR_W-1]) begin
          cur[k] <= neg[k] ? cur[k] - coord_t'(1) : cur[k] + coord_t'(1);
          err[k] <= err[k] + inc[k] - dec;
        end else begin
          err[k] <= err[k] + inc[k];
        end
      end
    end
  end

  assign point = make_point(cur[0], cur[1], cur[2]);

endmodule
