// br3d: the BR3D unit, a 3D Bresenham line generator for one segment.
//
// A `start` strobe samples the segment end points P1 and P2 through the
// setup stage (differences, magnitudes, greatest-difference selection) and
// loads the calculation unit. From the next cycle on the unit emits one
// point per clock, P1 first and P2 last, M+1 points in all (M = greatest
// coordinate difference), each as a memory write (wr_en, wr_addr, wr_data)
// at consecutive addresses from 0. On the cycle after the last write,
// `done` pulses for one cycle and `npts` holds the number of points
// written.
//
// Timing: start in cycle 0, writes in cycles 1..M+1, done in cycle M+2.
// The one load cycle ahead of the first point is this design's choice; the
// one-point-per-clock rate is the design's stated rate. A start while busy
// is ignored.
module br3d
  import br3d_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  point_t            p1,
  input  point_t            p2,
  output logic              busy,
  output logic              done,
  output logic [CNT_W-1:0]  npts,
  output logic              wr_en,
  output logic [SEG_AW-1:0] wr_addr,
  output point_t            wr_data
);

  typedef enum logic {S_IDLE, S_RUN} state_e;
  state_e state;

  axis_step_t steps [3];
  axis_e      major;
  coord_t     m;
  coord_t     remain;
  logic       load, step;

  br3d_setup u_setup (
    .p1    (p1),
    .p2    (p2),
    .steps (steps),
    .major (major),
    .m     (m)
  );

  assign load = (state == S_IDLE) && start;
  assign step = (state == S_RUN) && (remain != '0);

  br3d_calc u_calc (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (load),
    .step  (step),
    .start (p1),
    .steps (steps),
    .m     (m),
    .point (wr_data)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      remain  <= '0;
      wr_addr <= '0;
      done    <= 1'b0;
      npts    <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: begin
          if (start) begin
            state   <= S_RUN;
            remain  <= m;
            wr_addr <= '0;
          end
        end
        default: begin
          if (remain == '0) begin
            state <= S_IDLE;
            done  <= 1'b1;
            npts  <= CNT_W'(wr_addr) + CNT_W'(1);
          end else begin
            remain  <= remain - coord_t'(1);
            wr_addr <= wr_addr + SEG_AW'(1);
          end
        end
      endcase
    end
  end

  // The setup stage's M is the magnitude of the axis it calls driving, and
  // no axis differs by more.
  a_m_is_max: assert property (@(posedge clk) disable iff (!rst_n)
    load |-> (m == steps[major].absd) && (m >= steps[0].absd) &&
             (m >= steps[1].absd) && (m >= steps[2].absd));

  assign busy  = (state == S_RUN);
  assign wr_en = (state == S_RUN);

endmodule
