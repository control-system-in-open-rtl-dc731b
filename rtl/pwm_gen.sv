// pwm_gen: pulse-width modulator for one motor driver input.
//
// A free-running counter runs from 0 to PERIOD-1; the output is high while the
// counter is below the duty value, so the duty is given directly in clock
// cycles (0 = always low, PERIOD = always high). The duty input is sampled
// only when the counter wraps, so a change never cuts a period short or
// produces a runt pulse.
//
// A counter compared with a duty value is the PWM generator of the original
// design. The default period of 600 cycles (20 kHz from the 12 MHz board
// clock, the highest PWM rate the MC33926 driver accepts) and the update at
// the period boundary are this design's choices.
//
// Timing: a duty applied in the cycle where `period_start` is high takes
// effect in the next period; `pwm` is registered.
module pwm_gen #(
  parameter int unsigned PERIOD = 600,
  localparam int unsigned DUTY_W = $clog2(PERIOD + 1),
  localparam int unsigned CNT_W  = $clog2(PERIOD)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DUTY_W-1:0] duty,
  output logic              pwm,
  output logic              period_start   // counter is at its last value
);

  logic [CNT_W-1:0]  cnt;
  logic [DUTY_W-1:0] duty_q;

  assign period_start = (cnt == CNT_W'(PERIOD - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      duty_q <= '0;
      pwm    <= 1'b0;
    end else begin
      // The output always equals the compare of counter and latched duty.
      a_pwm_match: assert (pwm == (DUTY_W'(cnt) < duty_q));
      if (period_start) begin
        cnt    <= '0;
        duty_q <= duty;
        pwm    <= (duty != '0);
      end else begin
        cnt <= cnt + 1'b1;
        pwm <= (DUTY_W'(cnt) + 1'b1 < duty_q);
      end
    end
  end

endmodule
