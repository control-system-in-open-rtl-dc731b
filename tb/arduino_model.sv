// arduino_model: behavioural model of the sensor microcontroller's serial
// output, for simulation only.
//
// The real part reads the tilt angle from the IMU and writes it to its UART as
// two raw bytes, the integer degrees and then the hundredths, back to back,
// and then stays idle while it reads the next sample. This model does the
// sending part: 8N1 frames, LSB first, CLK_HZ/BAUD clock cycles per bit,
// timed on the testbench clock. Tasks let a testbench also send a frame with a
// bad stop bit, a short glitch on the line, or leave the line idle.
module arduino_model #(
  parameter int unsigned CLK_HZ = 12_000_000,
  parameter int unsigned BAUD   = 9_600
) (
  input  logic clk,
  output logic tx
);

  localparam int unsigned CPB = CLK_HZ / BAUD;

  initial tx = 1'b1;

  task automatic wait_bits(input int unsigned nbits);
    repeat (nbits * CPB) @(negedge clk);
  endtask

  // One 8N1 frame; stop_bit = 0 makes a framing error.
  task automatic send_byte(input logic [7:0] b, input logic stop_bit = 1'b1);
    @(negedge clk);
    tx = 1'b0;
    repeat (CPB) @(negedge clk);
    for (int i = 0; i < 8; i++) begin
      tx = b[i];
      repeat (CPB) @(negedge clk);
    end
    tx = stop_bit;
    repeat (CPB) @(negedge clk);
    tx = 1'b1;
  endtask

  // One angle sample: integer byte then decimal byte, then an idle gap.
  task automatic send_angle(input logic [7:0] int_part, input logic [7:0] dec_part,
                            input int unsigned gap_bits = 40);
    send_byte(int_part);
    send_byte(dec_part);
    wait_bits(gap_bits);
  endtask

  // A low pulse shorter than half a bit: must not start a frame.
  task automatic glitch(input int unsigned cycles);
    @(negedge clk);
    tx = 1'b0;
    repeat (cycles) @(negedge clk);
    tx = 1'b1;
  endtask

endmodule
