// angle_arranger: pairs the received bytes into angle samples.
//
// The sensor microcontroller sends every angle as two bytes, the integer part
// first and the decimal part second, with no separator. If the FPGA lost track
// of which byte is which it would build an angle from the decimal part of one
// sample and the integer part of the next. This block keeps the pairing:
//   * a byte is taken as the decimal part only if an integer part is pending,
//     the byte follows it within GAP_BITS bit times and its value is at most
//     100 (the largest decimal part that is ever sent);
//   * every other byte is taken as a new integer part.
// So a pair is resynchronised by the idle time between samples (the sender
// transmits the two bytes back to back and then pauses while it reads the
// sensor) and, inside a burst, by the range of the decimal part. Both rules
// are this design's own way of doing the ordering the original design needs.
//
// Interface: `byte_ready`/`data_byte` come from uart_rx. `frame` holds the last
// complete sample and `data_ready` pulses for one cycle, the cycle after the
// decimal byte's `byte_ready`, when `frame` changes.
module angle_arranger
  import sbr_pkg::*;
#(
  parameter int unsigned CLK_HZ   = 12_000_000,
  parameter int unsigned BAUD     = 9_600,
  parameter int unsigned GAP_BITS = 15
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         byte_ready,
  input  logic [7:0]   data_byte,
  output angle_frame_t frame,
  output logic         data_ready,
  output logic         resync       // a byte was taken as an integer part while one was pending
);

  localparam int unsigned GAP_CLKS = (CLK_HZ / BAUD) * GAP_BITS;
  localparam int unsigned GAP_W    = $clog2(GAP_CLKS + 1);
  localparam logic [7:0]  DEC_MAX  = 8'd100;

  logic [GAP_W-1:0] gap_cnt;      // cycles since the last byte, saturating
  logic             int_pending;  // an integer part waits for its decimal part
  logic [7:0]       int_hold;

  wire gap_expired = (gap_cnt >= GAP_W'(GAP_CLKS));
  wire is_decimal  = int_pending && !gap_expired && (data_byte <= DEC_MAX);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gap_cnt     <= GAP_W'(GAP_CLKS);
      int_pending <= 1'b0;
      int_hold    <= '0;
      frame       <= '0;
      data_ready  <= 1'b0;
      resync      <= 1'b0;
    end else begin
      data_ready <= 1'b0;
      resync     <= 1'b0;
      // A published sample always has its decimal part in range.
      if (data_ready) a_dec_range: assert (frame.dec_part <= DEC_MAX);
      if (!gap_expired) gap_cnt <= gap_cnt + 1'b1;
      if (byte_ready) begin
        gap_cnt <= '0;
        if (is_decimal) begin
          frame.int_part <= int_hold;
          frame.dec_part <= data_byte;
          data_ready     <= 1'b1;
          int_pending    <= 1'b0;
        end else begin
          resync      <= int_pending;
          int_hold    <= data_byte;
          int_pending <= 1'b1;
        end
      end
    end
  end

endmodule
