// tb_balance_loop: closed-loop balancing run of the whole controller.
//
// The controller (sbr_top, default parameters) is placed in a loop with a
// simple model of the robot: a rigid inverted pendulum on driven wheels,
//     theta'' = (G / L) * sin(theta) - (A_MAX / L) * drive * cos(theta),
// where theta is the forward tilt and `drive` (-1..+1) is the PWM high time of
// the motor pins, signed by their direction pins, averaged over 0.1 ms. The
// model is stepped with explicit Euler every 0.1 ms (1200 clock cycles). The
// sensor microcontroller model sends the tilt every 10 ms (100 Hz) as
// 90 degrees + theta, split into whole degrees and hundredths.
//
// The run starts tilted by 8 degrees, must come upright (|theta| < 0.5 deg
// averaged over the last 0.3 s of each phase) and is then pushed
// (theta' += 1.5 rad/s, enough to saturate the motors for a moment) and must
// recover the same way. It must never tilt past 20 degrees. The model's
// constants (L = 0.1 m, A_MAX = 5 m/s^2) and the gains Kp = 16, Kd = 48 are
// illustrative values, not measured ones; +kp=N and +kd=N override the gains.
module tb_balance_loop;
  import sbr_pkg::*;
  localparam int    CLK_HZ      = 12_000_000;
  localparam int    BAUD        = 9_600;
  localparam int    STEP_CYC    = 1200;            // 0.1 ms
  localparam int    SAMPLE_CYC  = CLK_HZ / 100;    // 10 ms
  localparam real   DT          = real'(STEP_CYC) / real'(CLK_HZ);
  localparam real   G           = 9.81;
  localparam real   L           = 0.1;
  localparam real   A_MAX       = 5.0;
  localparam real   PI          = 3.14159265358979;
  localparam real   DEG         = 180.0 / PI;

  logic clk = 1'b0, rst_n = 1'b0, rx;
  gain_t kp = 8'd16, kd = 8'd48;
  logic m_pwm [2], m_dir [2];
  angle_frame_t angle;
  logic angle_valid, saturated, speed_valid, resync;
  logic [9:0] duty;
  motor_dir_e dir;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  arduino_model #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_mcu (.clk(clk), .tx(rx));

  sbr_top dut (
    .clk(clk), .rst_n(rst_n), .rx(rx), .kp(kp), .kd(kd),
    .m_pwm(m_pwm), .m_dir(m_dir), .angle(angle), .angle_valid(angle_valid),
    .duty(duty), .dir(dir), .saturated(saturated), .speed_valid(speed_valid),
    .resync(resync));

  // ---------------- robot model ----------------
  real theta = 8.0 / DEG;   // rad, forward tilt
  real omega = 0.0;         // rad/s
  real max_tilt = 0.0;
  int  acc = 0, step_cnt = 0;
  bit  run_plant = 1'b0;

  always @(posedge clk) begin
    if (run_plant) begin
      // +1 per cycle driving forward, -1 driving backward, 0 when PWM low
      acc = acc + (m_pwm[0] ? (m_dir[0] ? -1 : 1) : 0) + (m_pwm[1] ? (m_dir[1] ? -1 : 1) : 0);
      step_cnt++;
      if (step_cnt == STEP_CYC) begin
        real drive, alpha;
        drive = real'(acc) / real'(2 * STEP_CYC);
        alpha = (G / L) * $sin(theta) - (A_MAX / L) * drive * $cos(theta);
        omega = omega + alpha * DT;
        theta = theta + omega * DT;
        if ((theta < 0.0 ? -theta : theta) > max_tilt) max_tilt = (theta < 0.0 ? -theta : theta);
        acc      = 0;
        step_cnt = 0;
      end
    end
  end

  // ---------------- mechanism counters ----------------
  int n_updates = 0, n_sat = 0, n_rev = 0, n_fwd = 0;
  always @(posedge clk) begin
    if (rst_n && speed_valid) begin
      n_updates++;
      if (saturated) n_sat++;
      if (dir == DIR_REV) n_rev++; else n_fwd++;
    end
  end

  // ---------------- sensor microcontroller ----------------
  task automatic send_sample();
    real deg;
    int  cent, ip, dp;
    deg  = 90.0 + theta * DEG;
    cent = int'($floor(deg * 100.0 + 0.5));
    if (cent < 0) cent = 0;
    if (cent > 25599) cent = 25599;
    ip = cent / 100;
    dp = cent % 100;
    u_mcu.send_byte(8'(ip));
    u_mcu.send_byte(8'(dp));
  endtask

  // Run for `ms` milliseconds of robot time; return the mean |theta| in
  // degrees over the last 300 ms.
  task automatic run_ms(input int ms, output real tail_mean);
    real sum;
    int  n;
    sum = 0.0;
    n   = 0;
    for (int k = 0; k < ms / 10; k++) begin
      fork
        send_sample();
        repeat (SAMPLE_CYC) @(negedge clk);
      join
      if (k >= ms / 10 - 30) begin
        sum += (theta < 0.0 ? -theta : theta) * DEG;
        n++;
      end
    end
    tail_mean = sum / real'(n);
  endtask

  initial begin
    real m1, m2;
    int  g;
    if ($value$plusargs("kp=%d", g)) kp = gain_t'(g);
    if ($value$plusargs("kd=%d", g)) kd = gain_t'(g);
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    run_plant = 1'b1;
    run_ms(1500, m1);
    $display("after start: theta=%f deg, mean |theta| over last 0.3 s = %f deg, max tilt %f deg",
             theta * DEG, m1, max_tilt * DEG);
    checks++;
    if (!(m1 < 0.5)) begin
      failures++;
      $display("FAIL did not come upright from the initial tilt");
    end
    omega = omega + 1.5;   // push
    run_ms(1500, m2);
    $display("after push: theta=%f deg, mean |theta| over last 0.3 s = %f deg, max tilt %f deg",
             theta * DEG, m2, max_tilt * DEG);
    checks++;
    if (!(m2 < 0.5)) begin
      failures++;
      $display("FAIL did not recover from the push");
    end
    checks++;
    if (max_tilt * DEG > 20.0) begin
      failures++;
      $display("FAIL tilted past 20 degrees");
    end
    checks++;
    if (n_updates < 250 || n_sat == 0 || n_rev == 0 || n_fwd == 0) begin
      failures++;
      $display("FAIL mechanisms: updates=%0d saturated=%0d rev=%0d fwd=%0d", n_updates, n_sat, n_rev, n_fwd);
    end
    $display("mechanisms: updates=%0d saturated=%0d reverse=%0d forward=%0d", n_updates, n_sat, n_rev, n_fwd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
