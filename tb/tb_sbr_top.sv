// tb_sbr_top: end-to-end test of the balance controller at its default
// parameters (12 MHz clock, 9600 baud, 600-cycle PWM, setpoint 90.00 deg).
//
// A model of the sensor microcontroller sends a sequence of angle samples as
// byte pairs over the serial line. For every sample the testbench computes,
// with plain integer arithmetic, the error, the P and D terms, the direction
// and the clamped duty, and checks them against the design's monitor outputs
// when speed_valid pulses. It then measures both motor pins over one PWM
// period and checks the high time and the direction pins. It also checks the
// pipeline latency from angle_valid to speed_valid (3 cycles).
//
// The sequence makes each mechanism happen and counts it: forward and reverse
// drive, saturation, zero duty, a non-zero D term, a gain change while
// running, a lost integer byte and a frame with a bad stop bit (both must
// give no sample and make the pairing resynchronise), a decimal slot holding
// a value above 100, and a line glitch. A mechanism that never happened
// counts as a failure.
module tb_sbr_top;
  import sbr_pkg::*;
  localparam int CLK_HZ   = 12_000_000;
  localparam int BAUD     = 9_600;
  localparam int SETPOINT = 9000;
  localparam int SHIFT    = 4;
  localparam int PERIOD   = 600;

  logic clk = 1'b0, rst_n = 1'b0, rx;
  gain_t kp = 8'd32, kd = 8'd16;
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

  // ---------------- reference model ----------------
  typedef struct {
    int i, d;        // bytes sent
    int duty;
    bit rev, sat;
    bit d_nonzero;
  } exp_t;
  exp_t exp_q[$];
  int   prev_err;
  bit   have_prev = 1'b0;

  // Mechanism counters.
  int n_samples = 0, n_fwd = 0, n_rev = 0, n_sat = 0, n_zero = 0, n_dterm = 0;
  int n_gain_change = 0, n_resync = 0, n_lost = 0, n_badstop = 0, n_bigdec = 0, n_glitch = 0;

  function automatic exp_t model(input int i, input int d);
    exp_t e;
    int err, p, dt, u, m;
    err = i * 100 + d - SETPOINT;
    p   = err * int'(kp);
    dt  = have_prev ? (err - prev_err) * int'(kd) : 0;
    prev_err  = err;
    have_prev = 1'b1;
    u = p + dt;
    e.i = i; e.d = d;
    e.rev = (u < 0);
    m = e.rev ? -u : u;
    m = m / (1 << SHIFT);
    e.sat  = (m > PERIOD);
    e.duty = e.sat ? PERIOD : m;
    e.d_nonzero = (dt !== 0);
    return e;
  endfunction

  // ---------------- checker on the monitor outputs ----------------
  exp_t last;
  longint cyc = 0, angle_cyc = -1;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (rst_n && resync) n_resync++;
    if (rst_n && angle_valid) angle_cyc = cyc;
    if (rst_n && speed_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected speed update");
      end else begin
        last = exp_q.pop_front();
        if (int'(angle.int_part) !== last.i || int'(angle.dec_part) !== last.d ||
            int'(duty) !== last.duty || (dir == DIR_REV) !== last.rev || saturated !== last.sat) begin
          failures++;
          $display("FAIL angle %0d.%0d (exp %0d.%0d): duty=%0d dir=%0d sat=%0b, expected %0d/%0b/%0b",
                   angle.int_part, angle.dec_part, last.i, last.d, duty, dir, saturated,
                   last.duty, last.rev, last.sat);
        end
        checks++;
        if (cyc - angle_cyc !== 3) begin
          failures++;
          $display("FAIL latency angle_valid->speed_valid %0d cycles", cyc - angle_cyc);
        end
        n_samples++;
        if (last.rev) n_rev++; else n_fwd++;
        if (last.sat) n_sat++;
        if (last.duty == 0) n_zero++;
        if (last.d_nonzero) n_dterm++;
      end
    end
  end

  // Send one good sample and check the motor pins once it has taken effect.
  task automatic sample(input int i, input int d);
    int h0, h1;
    exp_q.push_back(model(i, d));
    u_mcu.send_angle(8'(i), 8'(d), 40);   // the command lands early in the gap
    checks++;
    if (exp_q.size() !== 0) begin
      failures++;
      $display("FAIL sample %0d.%0d produced no command", i, d);
      exp_q.delete();
    end
    h0 = 0; h1 = 0;
    repeat (PERIOD) begin
      @(negedge clk);
      h0 += int'(m_pwm[0]);
      h1 += int'(m_pwm[1]);
    end
    checks++;
    if (h0 !== last.duty || h1 !== last.duty || m_dir[0] !== last.rev || m_dir[1] !== last.rev) begin
      failures++;
      $display("FAIL motor pins: high %0d/%0d dir %0b/%0b, expected %0d dir %0b",
               h0, h1, m_dir[0], m_dir[1], last.duty, last.rev);
    end
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    u_mcu.wait_bits(20);

    // Upright, then small tilts either way: P and D both act.
    sample(90, 0);
    sample(90, 50);
    sample(91, 10);
    sample(89, 75);
    sample(88, 0);
    sample(90, 0);
    // Large tilts: the command saturates.
    sample(100, 0);
    sample(70, 40);
    // Gains changed while running.
    kp = 8'd8; kd = 8'd40; n_gain_change++;
    sample(91, 0);
    sample(90, 20);
    sample(90, 20);        // no change and a small error
    // Lost integer byte: only a decimal byte arrives, then a good sample.
    u_mcu.send_byte(8'd33);
    u_mcu.wait_bits(40);
    n_lost++;
    sample(89, 90);
    // Integer byte with a bad stop bit: dropped; its decimal byte is then
    // taken as an integer part and discarded when the next sample starts.
    u_mcu.send_byte(8'd92, 1'b0);
    u_mcu.send_byte(8'd5);
    u_mcu.wait_bits(40);
    n_badstop++;
    sample(92, 5);
    // A byte above 100 where the decimal part should be: it is the integer
    // part of a new sample (sender restarted mid-pair).
    u_mcu.send_byte(8'd87);
    exp_q.push_back(model(150, 0));
    u_mcu.send_byte(8'd150);
    u_mcu.send_byte(8'd0);
    u_mcu.wait_bits(40);
    n_bigdec++;
    checks++;
    if (exp_q.size() !== 0) begin
      failures++;
      $display("FAIL sample after a big decimal byte was not produced");
      exp_q.delete();
    end
    // Short glitch on the line: ignored.
    u_mcu.glitch(CLK_HZ / BAUD / 4);
    u_mcu.wait_bits(20);
    n_glitch++;
    kp = 8'd32; kd = 8'd16; n_gain_change++;
    for (int k = 0; k < 12; k++) sample(85 + $urandom_range(10), $urandom_range(99));
    sample(90, 0);
    sample(90, 0);

    checks++;
    if (n_fwd == 0 || n_rev == 0 || n_sat == 0 || n_zero == 0 || n_dterm == 0 ||
        n_gain_change == 0 || n_resync < 3 || n_lost == 0 || n_badstop == 0 ||
        n_bigdec == 0 || n_glitch == 0) begin
      failures++;
      $display("FAIL mechanism not exercised");
    end
    $display("mechanisms: samples=%0d fwd=%0d rev=%0d saturated=%0d zero_duty=%0d d_term=%0d gain_changes=%0d resync=%0d lost_byte=%0d bad_stop=%0d big_decimal=%0d glitch=%0d",
             n_samples, n_fwd, n_rev, n_sat, n_zero, n_dterm, n_gain_change, n_resync,
             n_lost, n_badstop, n_bigdec, n_glitch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
