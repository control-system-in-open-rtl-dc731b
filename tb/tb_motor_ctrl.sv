// tb_motor_ctrl: self-checking test of the two-motor PWM/direction block.
//
// Uses a 50-cycle PWM period and motor 2 mounted mirrored (MIRROR = 2'b10).
// For each setting of the two directions and duties it waits for the new
// values to take effect and then checks, over one period window, that each
// motor's PWM is high for exactly its duty, and that each direction pin equals
// the requested direction, inverted for the mirrored motor. It also checks
// that a direction pin never changes except on a PWM period boundary.
module tb_motor_ctrl;
  import sbr_pkg::*;
  localparam int PERIOD = 50;

  logic clk = 1'b0, rst_n = 1'b0;
  motor_dir_e dir [2];
  logic [5:0] duty [2];
  logic m_pwm [2], m_dir [2];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  motor_ctrl #(.PWM_PERIOD(PERIOD), .MIRROR(2'b10)) dut (
    .clk(clk), .rst_n(rst_n), .dir(dir), .duty(duty), .m_pwm(m_pwm), .m_dir(m_dir));

  // Direction pins may change only in the first cycle of a period, which is
  // when the PWM counter is back at 0.
  int phase = 0;
  logic [1:0] dir_d;
  always @(posedge clk) begin
    if (!rst_n) phase <= 0;
    else        phase <= (phase == PERIOD - 1) ? 0 : phase + 1;
    dir_d <= {m_dir[1], m_dir[0]};
  end
  always @(negedge clk) begin
    if (rst_n && ({m_dir[1], m_dir[0]} !== dir_d) && phase !== 0) begin
      failures++;
      $display("FAIL direction changed mid-period (phase %0d)", phase);
    end
  end

  task automatic setting(input motor_dir_e d0, input int u0, input motor_dir_e d1, input int u1);
    int h0, h1;
    @(negedge clk);
    dir[0] = d0; duty[0] = 6'(u0);
    dir[1] = d1; duty[1] = 6'(u1);
    repeat (2 * PERIOD + $urandom_range(PERIOD)) @(negedge clk);
    h0 = 0; h1 = 0;
    repeat (PERIOD) begin
      @(negedge clk);
      h0 += int'(m_pwm[0]);
      h1 += int'(m_pwm[1]);
    end
    checks++;
    if (h0 !== u0 || h1 !== u1) begin
      failures++;
      $display("FAIL high cycles %0d/%0d expected %0d/%0d", h0, h1, u0, u1);
    end
    checks++;
    if (m_dir[0] !== (d0 == DIR_REV) || m_dir[1] !== (d1 !== DIR_REV)) begin
      failures++;
      $display("FAIL dir pins %0b/%0b for dir %0d/%0d", m_dir[0], m_dir[1], d0, d1);
    end
  endtask

  initial begin
    dir  = '{DIR_FWD, DIR_FWD};
    duty = '{6'd0, 6'd0};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    setting(DIR_FWD, 10, DIR_FWD, 10);
    setting(DIR_REV, 25, DIR_REV, 25);
    setting(DIR_FWD, 0, DIR_REV, PERIOD);
    setting(DIR_REV, PERIOD, DIR_FWD, 1);
    for (int k = 0; k < 20; k++)
      setting(motor_dir_e'($urandom_range(1)), $urandom_range(PERIOD),
              motor_dir_e'($urandom_range(1)), $urandom_range(PERIOD));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
