// tb_angle_arranger: self-checking test of the byte-pairing block.
//
// Drives byte_ready/data_byte directly with a short bit time (10 cycles per
// bit, so the resynchronisation gap is 150 cycles) and checks: ordinary pairs,
// a sample whose integer byte was lost (the decimal byte arrives alone after
// a pause and must be dropped), an integer byte that arrives where a decimal
// part was expected with a value above 100 (taken as a new integer part), and
// a pair split by a pause longer than the gap (the second byte starts a new
// sample). Expected frames are written down per scenario.
module tb_angle_arranger;
  import sbr_pkg::*;
  localparam int unsigned CLK_HZ = 1_000;
  localparam int unsigned BAUD   = 100;
  localparam int unsigned GAP    = 15;
  localparam int unsigned GAP_CLKS = CLK_HZ / BAUD * GAP;

  logic clk = 1'b0, rst_n = 1'b0;
  logic byte_ready = 1'b0;
  logic [7:0] data_byte = '0;
  angle_frame_t frame;
  logic data_ready, resync;
  int checks = 0, failures = 0;
  int resyncs = 0;

  always #5 clk = ~clk;

  angle_arranger #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .GAP_BITS(GAP)) dut (
    .clk(clk), .rst_n(rst_n), .byte_ready(byte_ready), .data_byte(data_byte),
    .frame(frame), .data_ready(data_ready), .resync(resync));

  angle_frame_t exp_q[$];
  always @(posedge clk) begin
    if (rst_n && resync) resyncs++;
    if (rst_n && data_ready) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected frame %0d.%0d", frame.int_part, frame.dec_part);
      end else begin
        angle_frame_t e;
        e = exp_q.pop_front();
        if (frame !== e) begin
          failures++;
          $display("FAIL frame %0d.%0d expected %0d.%0d", frame.int_part, frame.dec_part,
                   e.int_part, e.dec_part);
        end
      end
    end
  end

  task automatic put(input logic [7:0] b, input int unsigned wait_after);
    @(negedge clk);
    byte_ready = 1'b1;
    data_byte  = b;
    @(negedge clk);
    byte_ready = 1'b0;
    data_byte  = 8'($urandom);
    repeat (wait_after) @(negedge clk);
  endtask

  // One sample with bytes 100 cycles apart (back to back at 10 bits/byte) and
  // a pause longer than the gap after it.
  task automatic pair(input logic [7:0] i, input logic [7:0] d, input bit expect_it = 1'b1);
    if (expect_it) exp_q.push_back('{int_part: i, dec_part: d});
    put(i, 99);
    put(d, GAP_CLKS + 20);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    pair(8'd90, 8'd0);
    pair(8'd91, 8'd25);
    pair(8'd255, 8'd100);
    pair(8'd0, 8'd99);
    for (int k = 0; k < 20; k++) pair(8'($urandom), 8'($urandom_range(100)));
    // lost integer byte: the decimal byte 37 arrives alone and is taken as an
    // integer part, then the next sample's integer byte replaces it.
    put(8'd37, GAP_CLKS + 20);
    pair(8'd88, 8'd12);
    // decimal slot holds a value above 100: it must be a new integer part
    put(8'd80, 99);
    exp_q.push_back('{int_part: 8'd150, dec_part: 8'd42});
    put(8'd150, 99);
    put(8'd42, GAP_CLKS + 20);
    // pause inside a pair longer than the gap: the second byte restarts
    put(8'd70, GAP_CLKS + 5);
    exp_q.push_back('{int_part: 8'd71, dec_part: 8'd5});
    put(8'd71, 99);
    put(8'd5, GAP_CLKS + 20);
    pair(8'd89, 8'd50);
    repeat (10) @(posedge clk);
    checks++;
    if (exp_q.size() !== 0) begin
      failures++;
      $display("FAIL %0d frames never came", exp_q.size());
    end
    checks++;
    if (resyncs !== 3) begin
      failures++;
      $display("FAIL %0d resyncs, expected 3", resyncs);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
