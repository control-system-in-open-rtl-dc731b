// tb_pwm_gen: self-checking test of the PWM generator at its default
// 600-cycle period.
//
// For a list of duty values (0, 1, mid, PERIOD-1, PERIOD and random ones) it
// measures each full period: its length must be PERIOD cycles and the number
// of high cycles must equal the duty applied before that period began, with
// the high cycles first. A duty change in the middle of a period must not
// affect that period.
module tb_pwm_gen;
  localparam int PERIOD = 600;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [9:0] duty = '0;
  logic pwm, period_start;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pwm_gen #(.PERIOD(PERIOD)) dut (.clk(clk), .rst_n(rst_n), .duty(duty), .pwm(pwm),
                                  .period_start(period_start));

  // Measure one period starting right after a period_start pulse.
  task automatic measure(input int expect_high);
    int high, len;
    bit seen_low, shape_ok;
    high = 0; len = 0; seen_low = 0; shape_ok = 1;
    do begin
      @(posedge clk);
      #1;
      len++;
      if (pwm) begin
        high++;
        if (seen_low) shape_ok = 0;
      end else seen_low = 1;
    end while (!period_start);
    checks++;
    if (len !== PERIOD || high !== expect_high || !shape_ok) begin
      failures++;
      $display("FAIL period len=%0d high=%0d expected %0d/%0d shape_ok=%0b",
               len, high, PERIOD, expect_high, shape_ok);
    end
  endtask

  // Set a duty, wait for the period boundary, then measure the next period
  // while scrambling the input half-way through.
  task automatic run(input int d);
    @(negedge clk);
    duty = 10'(d);
    while (!period_start) @(negedge clk);
    fork
      measure(d);
      begin
        repeat (PERIOD / 2) @(negedge clk);
        duty = 10'($urandom_range(PERIOD));
      end
    join
    duty = 10'(d);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(0);
    run(1);
    run(300);
    run(PERIOD - 1);
    run(PERIOD);
    run(2);
    for (int k = 0; k < 30; k++) run($urandom_range(PERIOD));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
