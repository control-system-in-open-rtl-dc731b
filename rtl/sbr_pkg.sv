// sbr_pkg: types and constants shared by the self-balancing robot controller.
//
// The angle arrives from the sensor microcontroller as two unsigned bytes: an
// integer part (degrees, 0..255) and a decimal part (hundredths, 0..100).
// Inside the FPGA the two are merged into one number in hundredths of a
// degree (integer * 100 + decimal), which avoids any fractional arithmetic.
// The widths below are sized for that range and for 8-bit unsigned gains;
// the gain width and the control-word widths are this design's own choice.
package sbr_pkg;

  // Largest merged angle: 255 * 100 + 100 = 25600 hundredths (15 bits).
  localparam int unsigned ANGLE_W = 15;
  // Signed error (angle - setpoint): one more bit for the sign, one spare.
  localparam int unsigned ERR_W   = 17;
  // Unsigned gains Kp and Kd, changed at run time.
  localparam int unsigned GAIN_W  = 8;
  // Proportional term err * Kp and derivative term (err - err_prev) * Kd.
  localparam int unsigned TERM_W  = ERR_W + 1 + GAIN_W + 1;   // 27
  // Sum of the two terms.
  localparam int unsigned CTRL_W  = TERM_W + 1;               // 28

  typedef logic        [GAIN_W-1:0]  gain_t;
  typedef logic        [ANGLE_W-1:0] angle_t;
  typedef logic signed [ERR_W-1:0]   err_t;
  typedef logic signed [TERM_W-1:0]  term_t;
  typedef logic signed [CTRL_W-1:0]  ctrl_t;

  // One angle sample as the microcontroller sends it.
  typedef struct packed {
    logic [7:0] int_part;   // whole degrees, 0..255
    logic [7:0] dec_part;   // hundredths of a degree, 0..100
  } angle_frame_t;

  // Motor turning sense as seen by the motor driver's direction pin.
  typedef enum logic {
    DIR_FWD = 1'b0,
    DIR_REV = 1'b1
  } motor_dir_e;

endpackage
