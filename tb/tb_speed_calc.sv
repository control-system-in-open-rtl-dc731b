// tb_speed_calc: self-checking test of the speed and direction stage.
//
// Applies P and D terms of both signs, small and large, and checks one cycle
// after d_valid that dir is the sign of P + D, that duty is |P + D| / 16
// clamped to 600 and that saturated is set exactly when the clamp acted.
// It also checks that the outputs do not move without d_valid.
module tb_speed_calc;
  import sbr_pkg::*;
  localparam int SHIFT = 4;
  localparam int DMAX  = 600;

  logic clk = 1'b0, rst_n = 1'b0;
  term_t p_term = '0, d_term = '0;
  logic d_valid = 1'b0;
  motor_dir_e dir;
  logic [9:0] duty;
  logic saturated, speed_valid;
  int checks = 0, failures = 0;
  int n_fwd = 0, n_rev = 0, n_sat = 0;

  always #5 clk = ~clk;

  speed_calc #(.SPEED_SHIFT(SHIFT), .DUTY_MAX(DMAX)) dut (
    .clk(clk), .rst_n(rst_n), .p_term(p_term), .d_term(d_term), .d_valid(d_valid),
    .dir(dir), .duty(duty), .saturated(saturated), .speed_valid(speed_valid));

  task automatic apply(input int p, input int d);
    int u, m, dref;
    bit sref, rref;
    @(negedge clk);
    p_term  = term_t'(p);
    d_term  = term_t'(d);
    d_valid = 1'b1;
    @(negedge clk);
    d_valid = 1'b0;
    u    = p + d;
    rref = (u < 0);
    m    = rref ? -u : u;
    m    = m / (1 << SHIFT);
    sref = (m > DMAX);
    dref = sref ? DMAX : m;
    if (rref) n_rev++; else n_fwd++;
    if (sref) n_sat++;
    checks++;
    if (!speed_valid || (dir == DIR_REV) !== rref || int'(duty) !== dref || saturated !== sref) begin
      failures++;
      $display("FAIL p=%0d d=%0d: dir=%0d duty=%0d sat=%0b, expected dir=%0d duty=%0d sat=%0b",
               p, d, dir, duty, saturated, rref, dref, sref);
    end
    p_term = term_t'($urandom);
    d_term = term_t'($urandom);
    repeat (2) @(negedge clk);
    checks++;
    if ((dir == DIR_REV) !== rref || int'(duty) !== dref) begin
      failures++;
      $display("FAIL outputs moved without d_valid");
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    apply(0, 0);
    apply(16, 0);
    apply(-16, 0);
    apply(-17, 0);
    apply(9600, 0);
    apply(9615, 1);
    apply(9616, 0);
    apply(-9616, 0);
    apply(100000, -100000);
    apply(3000, -5000);
    apply(-2_295_000, -6_528_000);
    apply(4_233_000, 6_528_000);
    for (int k = 0; k < 300; k++) begin
      int e, de, p, d;
      e  = int'($urandom_range(25600)) - 9000;
      de = int'($urandom_range(51200)) - 25600;
      p  = e * int'($urandom_range(255));
      d  = de * int'($urandom_range(255));
      if ($urandom_range(1) == 1) begin
        p = p / 64;
        d = d / 64;
      end
      apply(p, d);
    end
    checks++;
    if (n_fwd == 0 || n_rev == 0 || n_sat == 0) begin
      failures++;
      $display("FAIL coverage fwd=%0d rev=%0d sat=%0d", n_fwd, n_rev, n_sat);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
