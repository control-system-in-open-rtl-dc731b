// d_ctrl: derivative branch of the balance controller.
//
// A two-state machine toggles on every new error sample. The two states own
// one error register each: in state A the new error is written to register A
// and the difference is taken against register B, which holds the previous
// error; in state B the roles swap. The difference (current error minus last
// error) is multiplied by the run-time gain `kd`.
//
// The two-state scheme, the subtraction and the gain follow the original
// design. Holding the D term at zero for the first sample after reset (when no
// previous error exists) and the 8-bit gain are this design's choices.
//
// Timing: `d_term` is registered; `d_valid` pulses one cycle after `err_valid`.
module d_ctrl
  import sbr_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  err_t  err,
  input  logic  err_valid,
  input  gain_t kd,
  output term_t d_term,
  output logic  d_valid
);

  typedef enum logic {ST_A, ST_B} d_state_e;

  d_state_e state;
  err_t     err_a, err_b;
  logic     primed;          // a previous error exists
  err_t     err_prev;
  logic signed [ERR_W:0] diff;

  always_comb begin
    err_prev = (state == ST_A) ? err_b : err_a;
    diff     = (ERR_W+1)'(err) - (ERR_W+1)'(err_prev);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= ST_A;
      err_a   <= '0;
      err_b   <= '0;
      primed  <= 1'b0;
      d_term  <= '0;
      d_valid <= 1'b0;
    end else begin
      d_valid <= err_valid;
      if (err_valid) begin
        if (state == ST_A) begin
          err_a <= err;
          state <= ST_B;
        end else begin
          err_b <= err;
          state <= ST_A;
        end
        primed <= 1'b1;
        d_term <= primed ? TERM_W'(diff) * $signed({1'b0, kd}) : '0;
      end
    end
  end

endmodule
