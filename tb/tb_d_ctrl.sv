// tb_d_ctrl: self-checking test of the derivative branch.
//
// Feeds a sequence of errors (steps, sign changes, extremes and random values)
// with changing gains, and checks one cycle after each err_valid that d_term
// equals (error - previous error) * kd, and 0 for the first sample after
// reset. The previous error is tracked here independently of the block's two
// alternating registers, so a swap of the registers is caught.
module tb_d_ctrl;
  import sbr_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  err_t err = '0;
  logic err_valid = 1'b0;
  gain_t kd = '0;
  term_t d_term;
  logic d_valid;
  int checks = 0, failures = 0;
  int prev;
  bit first = 1'b1;

  always #5 clk = ~clk;

  d_ctrl dut (.clk(clk), .rst_n(rst_n), .err(err), .err_valid(err_valid), .kd(kd),
              .d_term(d_term), .d_valid(d_valid));

  task automatic sample(input int e, input int g, input int idle = 2);
    int d_ref;
    @(negedge clk);
    err       = err_t'(e);
    kd        = gain_t'(g);
    err_valid = 1'b1;
    @(negedge clk);
    err_valid = 1'b0;
    d_ref = first ? 0 : (e - prev) * g;
    checks++;
    if (!d_valid || int'(d_term) !== d_ref) begin
      failures++;
      $display("FAIL err=%0d prev=%0d kd=%0d: valid=%0b d=%0d expected %0d",
               e, prev, g, d_valid, d_term, d_ref);
    end
    prev  = e;
    first = 1'b0;
    err   = err_t'($urandom);
    repeat (idle) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    sample(100, 50);
    sample(100, 50);
    sample(150, 50);
    sample(-150, 7);
    sample(-9000, 255);
    sample(16600, 255);
    sample(-9000, 255);
    sample(0, 3, 0);
    sample(1, 3, 0);
    for (int k = 0; k < 300; k++)
      sample($urandom_range(25600) - 9000, $urandom_range(255), $urandom_range(3));
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
