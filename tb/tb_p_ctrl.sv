// tb_p_ctrl: self-checking test of the proportional branch.
//
// Applies corner and random angle samples and gains, and checks that one
// cycle after data_ready the error equals (int*100 + dec) - 9000 and the
// P term equals error * kp, both worked out with plain integers here, and that
// the outputs hold between samples.
module tb_p_ctrl;
  import sbr_pkg::*;
  localparam int SETPOINT = 9000;

  logic clk = 1'b0, rst_n = 1'b0;
  angle_frame_t frame = '0;
  logic data_ready = 1'b0;
  gain_t kp = '0;
  err_t err;
  term_t p_term;
  logic p_valid;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  p_ctrl #(.SETPOINT(SETPOINT)) dut (
    .clk(clk), .rst_n(rst_n), .frame(frame), .data_ready(data_ready), .kp(kp),
    .err(err), .p_term(p_term), .p_valid(p_valid));

  task automatic sample(input int i, input int d, input int g);
    int e_ref, p_ref;
    @(negedge clk);
    frame.int_part = 8'(i);
    frame.dec_part = 8'(d);
    kp             = gain_t'(g);
    data_ready     = 1'b1;
    @(negedge clk);
    data_ready = 1'b0;
    e_ref = i * 100 + d - SETPOINT;
    p_ref = e_ref * g;
    checks++;
    if (!p_valid || int'(err) !== e_ref || int'(p_term) !== p_ref) begin
      failures++;
      $display("FAIL %0d.%0d kp=%0d: valid=%0b err=%0d (%0d) p=%0d (%0d)",
               i, d, g, p_valid, err, e_ref, p_term, p_ref);
    end
    // outputs hold while no new sample arrives, even if the inputs move
    frame = angle_frame_t'($urandom);
    kp    = gain_t'($urandom);
    repeat (3) @(negedge clk);
    checks++;
    if (p_valid || int'(err) !== e_ref || int'(p_term) !== p_ref) begin
      failures++;
      $display("FAIL outputs did not hold");
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    sample(90, 0, 10);
    sample(90, 1, 255);
    sample(89, 99, 255);
    sample(0, 0, 255);
    sample(255, 100, 255);
    sample(120, 50, 0);
    sample(45, 7, 1);
    for (int k = 0; k < 200; k++) sample($urandom_range(255), $urandom_range(100), $urandom_range(255));
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
