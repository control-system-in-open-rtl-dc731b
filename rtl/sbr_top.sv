// sbr_top: balance controller of a two-wheeled inverted-pendulum robot.
//
// A microcontroller reads the tilt angle from an IMU and sends it over a
// one-way serial line as two bytes (integer degrees, then hundredths). This
// top receives those bytes (uart_rx), pairs them into angle samples
// (angle_arranger), runs a PD controller on each sample (p_ctrl, d_ctrl),
// converts the control word to a speed and a direction (speed_calc) and drives
// both wheel motors with PWM through a dual H-bridge (motor_ctrl). Both wheels
// get the same command: the robot balances by driving under its centre of
// mass.
//
// Interface: `rx` is the serial input; `kp` and `kd` are the gains and may be
// changed at any time (they are used at the next sample); `m_pwm`/`m_dir` go
// to the motor driver. `angle`, `angle_valid`, `duty`, `dir`, `saturated`,
// `speed_valid` (a new command was computed) and `resync` (the byte pairing
// was restarted) are brought out for monitoring.
//
// Timing: a sample reaches `duty`/`dir` four clock cycles after the decimal
// byte's stop bit is checked (arranger, P, D, speed each take one cycle) and
// reaches the motor pins at the start of the next PWM period. The parameter
// defaults are the board's 12 MHz clock and this design's choices for the rest
// (see each block).
module sbr_top
  import sbr_pkg::*;
#(
  parameter int unsigned CLK_HZ      = 12_000_000,
  parameter int unsigned BAUD        = 9_600,
  parameter int unsigned GAP_BITS    = 15,
  parameter int unsigned SETPOINT    = 9000,
  parameter int unsigned SPEED_SHIFT = 4,
  parameter int unsigned PWM_PERIOD  = 600,
  parameter logic [1:0]  MIRROR      = 2'b00,
  localparam int unsigned DUTY_W     = $clog2(PWM_PERIOD + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              rx,
  input  gain_t             kp,
  input  gain_t             kd,
  output logic              m_pwm [2],
  output logic              m_dir [2],
  output angle_frame_t      angle,
  output logic              angle_valid,
  output logic [DUTY_W-1:0] duty,
  output motor_dir_e        dir,
  output logic              saturated,
  output logic              speed_valid,
  output logic              resync
);

  logic       byte_ready;
  logic [7:0] rx_byte;
  err_t       err;
  term_t      p_term, d_term;
  logic       p_valid, d_valid;

  uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_rx (
    .clk         (clk),
    .rst_n       (rst_n),
    .rx          (rx),
    .byte_ready  (byte_ready),
    .data_buffer (rx_byte)
  );

  angle_arranger #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .GAP_BITS(GAP_BITS)) u_arr (
    .clk        (clk),
    .rst_n      (rst_n),
    .byte_ready (byte_ready),
    .data_byte  (rx_byte),
    .frame      (angle),
    .data_ready (angle_valid),
    .resync     (resync)
  );

  p_ctrl #(.SETPOINT(SETPOINT)) u_p (
    .clk        (clk),
    .rst_n      (rst_n),
    .frame      (angle),
    .data_ready (angle_valid),
    .kp         (kp),
    .err        (err),
    .p_term     (p_term),
    .p_valid    (p_valid)
  );

  d_ctrl u_d (
    .clk       (clk),
    .rst_n     (rst_n),
    .err       (err),
    .err_valid (p_valid),
    .kd        (kd),
    .d_term    (d_term),
    .d_valid   (d_valid)
  );

  speed_calc #(.SPEED_SHIFT(SPEED_SHIFT), .DUTY_MAX(PWM_PERIOD)) u_speed (
    .clk         (clk),
    .rst_n       (rst_n),
    .p_term      (p_term),
    .d_term      (d_term),
    .d_valid     (d_valid),
    .dir         (dir),
    .duty        (duty),
    .saturated   (saturated),
    .speed_valid (speed_valid)
  );

  // Both wheels receive the same speed and direction.
  motor_dir_e        mot_dir  [2];
  logic [DUTY_W-1:0] mot_duty [2];
  assign mot_dir  = '{dir, dir};
  assign mot_duty = '{duty, duty};

  motor_ctrl #(.PWM_PERIOD(PWM_PERIOD), .MIRROR(MIRROR)) u_mot (
    .clk   (clk),
    .rst_n (rst_n),
    .dir   (mot_dir),
    .duty  (mot_duty),
    .m_pwm (m_pwm),
    .m_dir (m_dir)
  );

endmodule
