// motor_ctrl: drives the two DC motors through a dual H-bridge driver.
//
// Each motor takes a direction pin and a PWM pin on the driver (MC33926 style:
// DIR selects the bridge polarity, PWM gates it). The block holds one pwm_gen
// per motor and forwards the direction of travel. The two motors sit on
// opposite sides of the chassis; when one is mounted mirrored, setting its
// bit in MIRROR makes the same direction of travel turn it the other way.
// Direction changes are applied together with the next PWM period so that a
// motor never gets a new polarity in the middle of a pulse.
//
// Driving both wheels of the balancing robot with PWM speed and a direction
// follows the original design; the MIRROR option and the period-aligned
// direction update are this design's choices.
//
// Timing: `duty` and `dir` are taken at the end of each PWM period (see
// pwm_gen); `m_dir` changes in the cycle the new period starts.
module motor_ctrl
  import sbr_pkg::*;
#(
  parameter int unsigned PWM_PERIOD = 600,
  parameter logic [1:0]  MIRROR     = 2'b00,
  localparam int unsigned DUTY_W    = $clog2(PWM_PERIOD + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  motor_dir_e        dir   [2],
  input  logic [DUTY_W-1:0] duty  [2],
  output logic              m_pwm [2],
  output logic              m_dir [2]
);

  for (genvar m = 0; m < 2; m++) begin : g_motor
    logic period_start;

    pwm_gen #(.PERIOD(PWM_PERIOD)) u_pwm (
      .clk          (clk),
      .rst_n        (rst_n),
      .duty         (duty[m]),
      .pwm          (m_pwm[m]),
      .period_start (period_start)
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)            m_dir[m] <= 1'b0;
      else if (period_start) m_dir[m] <= (dir[m] == DIR_REV) ^ MIRROR[m];
    end
  end

endmodule
