// p_ctrl: proportional branch of the balance controller.
//
// On every new angle sample (`data_ready`) the block merges the two unsigned
// bytes into one number in hundredths of a degree. The integer part is scaled
// up by 100 rather than the decimal part scaled down by 100, so no fraction is
// ever formed. It then subtracts the upright setpoint to get the signed error
// and multiplies that by the run-time gain `kp`. The error is passed on to the
// derivative branch together with `p_valid`.
//
// The merge by x100 and the run-time gain follow the original design. The
// setpoint parameter (default 90.00 degrees, i.e. the sender is taken to add a
// 90 degree offset so that the upright robot reads 90) and the 8-bit gain width
// are this design's choices.
//
// Timing: `err` and `p_term` are registered; `p_valid` pulses one cycle after
// `data_ready`. Both outputs hold their value until the next sample.
module p_ctrl
  import sbr_pkg::*;
#(
  parameter int unsigned SETPOINT = 9000   // hundredths of a degree
) (
  input  logic         clk,
  input  logic         rst_n,
  input  angle_frame_t frame,
  input  logic         data_ready,
  input  gain_t        kp,
  output err_t         err,
  output term_t        p_term,
  output logic         p_valid
);

  angle_t angle;
  err_t   err_now;

  always_comb begin
    angle   = ANGLE_W'(frame.int_part) * ANGLE_W'(100) + ANGLE_W'(frame.dec_part);
    err_now = $signed({2'b00, angle}) - $signed(ERR_W'(SETPOINT));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      err     <= '0;
      p_term  <= '0;
      p_valid <= 1'b0;
    end else begin
      p_valid <= data_ready;
      if (data_ready) begin
        err    <= err_now;
        p_term <= TERM_W'(err_now) * $signed({1'b0, kp});
      end
    end
  end

endmodule
