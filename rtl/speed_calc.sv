// speed_calc: turns the PD control word into a motor speed and direction.
//
// When a new derivative term arrives (`d_valid`, which also means the
// proportional term of the same sample is settled) the block adds the two
// terms, takes the sign as the direction of travel and the magnitude, divided
// by 2**SPEED_SHIFT, as the PWM duty in clock cycles. A duty above DUTY_MAX
// (one full PWM period) is clamped and `saturated` is raised for that sample.
//
// The sum of the P and D terms and the use of a speed plus a direction for the
// motor driver follow the original design; the scaling shift, the clamp and
// the sign convention (a positive error drives forward) are this design's
// choices.
//
// Timing: `dir`, `duty` and `saturated` are registered and change one cycle
// after `d_valid`; `speed_valid` pulses in that cycle.
module speed_calc
  import sbr_pkg::*;
#(
  parameter int unsigned SPEED_SHIFT = 4,
  parameter int unsigned DUTY_MAX    = 600,
  localparam int unsigned DUTY_W     = $clog2(DUTY_MAX + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  term_t             p_term,
  input  term_t             d_term,
  input  logic              d_valid,
  output motor_dir_e        dir,
  output logic [DUTY_W-1:0] duty,
  output logic              saturated,
  output logic              speed_valid
);

  ctrl_t              u;
  logic [CTRL_W-1:0]  mag;
  logic [CTRL_W-1:0]  mag_scaled;

  always_comb begin
    u          = CTRL_W'(p_term) + CTRL_W'(d_term);
    mag        = u[CTRL_W-1] ? CTRL_W'(-u) : CTRL_W'(u);
    mag_scaled = mag >> SPEED_SHIFT;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dir         <= DIR_FWD;
      duty        <= '0;
      saturated   <= 1'b0;
      speed_valid <= 1'b0;
    end else begin
      speed_valid <= d_valid;
      if (d_valid) begin
        dir <= u[CTRL_W-1] ? DIR_REV : DIR_FWD;
        if (mag_scaled > CTRL_W'(DUTY_MAX)) begin
          duty      <= DUTY_W'(DUTY_MAX);
          saturated <= 1'b1;
        end else begin
          duty      <= DUTY_W'(mag_scaled);
          saturated <= 1'b0;
        end
      end
    end
  end

endmodule
