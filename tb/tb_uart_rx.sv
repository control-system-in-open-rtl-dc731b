// tb_uart_rx: self-checking test of the serial receiver at the default
// 12 MHz / 9600 baud timing.
//
// Sends known and random bytes through the microcontroller model and checks
// every received byte against what was sent, that each byte_ready comes
// 9.5 bit times (+ a few cycles of register delay) after the start edge, that
// a frame with a low stop bit and a short glitch produce no byte, and that
// back-to-back frames are all received.
module tb_uart_rx;
  localparam int unsigned CLK_HZ = 12_000_000;
  localparam int unsigned BAUD   = 9_600;
  localparam int unsigned CPB    = CLK_HZ / BAUD;
  localparam longint      LAT_MIN = longint'(CPB) / 2 + 9 * longint'(CPB);

  logic clk = 1'b0, rst_n = 1'b0, rx;
  logic byte_ready;
  logic [7:0] data_buffer;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  arduino_model #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_src (.clk(clk), .tx(rx));
  uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) dut (
    .clk(clk), .rst_n(rst_n), .rx(rx), .byte_ready(byte_ready), .data_buffer(data_buffer));

  // Scoreboard: bytes expected, in order.
  logic [7:0] exp_q[$];
  longint     start_cyc_q[$];
  longint     cyc = 0;
  int         received = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // Record the cycle of every falling edge that starts a real frame.
  logic rx_d = 1'b1;
  logic expect_frame = 1'b0;
  always @(posedge clk) begin
    rx_d <= rx;
    if (rx_d && !rx && expect_frame) begin
      start_cyc_q.push_back(cyc);
      expect_frame <= 1'b0;   // only the start bit's edge
    end
  end

  always @(posedge clk) begin
    if (rst_n && byte_ready) begin
      longint lat;
      received++;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected byte %02h at cycle %0d", data_buffer, cyc);
      end else begin
        logic [7:0] e;
        e = exp_q.pop_front();
        if (data_buffer !== e) begin
          failures++;
          $display("FAIL byte %02h expected %02h", data_buffer, e);
        end
        lat = cyc - start_cyc_q.pop_front();
        checks++;
        // edge seen -> 2 sync flops -> half bit -> 8 data bits + stop bit -> output register
        if (lat < LAT_MIN || lat > LAT_MIN + 5) begin
          failures++;
          $display("FAIL latency %0d cycles", lat);
        end
      end
    end
  end

  task automatic send_ok(input logic [7:0] b);
    exp_q.push_back(b);
    expect_frame = 1'b1;
    u_src.send_byte(b);
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    u_src.wait_bits(2);
    send_ok(8'h00);
    send_ok(8'hFF);
    send_ok(8'hA5);
    send_ok(8'h5A);
    send_ok(8'd100);
    send_ok(8'd255);
    for (int i = 0; i < 30; i++) send_ok(8'($urandom));
    // framing error: no byte may appear
    u_src.send_byte(8'h3C, 1'b0);
    u_src.wait_bits(3);
    // glitch shorter than half a bit: no byte may appear
    u_src.glitch(CPB / 4);
    u_src.wait_bits(12);
    send_ok(8'hC3);
    u_src.wait_bits(3);
    checks++;
    if (received !== 37 || exp_q.size() !== 0) begin
      failures++;
      $display("FAIL received %0d bytes, %0d still expected", received, exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
