// uart_rx: receiver for the one-way serial link from the sensor microcontroller.
//
// The line carries 8N1 frames (one low start bit, eight data bits LSB first,
// one high stop bit) at a fixed, known rate. The receiver is split in two
// processes, as in the original design:
//   * Process 1 is a state machine IDLE -> START -> DATA -> STOP -> IDLE that
//     times the frame. IDLE waits for the falling edge of the start bit, START
//     waits half a bit and checks the line is still low, DATA counts one bit
//     time per data bit and raises the one-cycle flag `bit_capture` at the
//     centre of each bit, STOP waits one more bit time and checks the stop bit.
//   * Process 2 reacts only to that flag: it shifts the sampled bit into an
//     8-bit buffer and, when Process 1 reports a valid stop bit, copies the
//     buffer to `data_buffer` and pulses `byte_ready`.
// The input is passed through a two-flop synchroniser first. IDLE starts a
// frame only on a high-to-low edge, so a line held low (a break, or the rest of
// a bad stop bit) does not start one. A start bit that does not last half a bit
// time is taken as a glitch; a frame whose stop bit is low is dropped. These
// rules, the synchroniser and the default rate of 9600 baud are this design's
// choices; the 12 MHz clock is the board's.
//
// Timing: `byte_ready` rises for one cycle about half a bit time after the
// start of the stop bit, i.e. 9.5 bit times after the start-bit edge plus
// four clock cycles of synchroniser, edge-detect and register delay.
module uart_rx #(
  parameter int unsigned CLK_HZ = 12_000_000,
  parameter int unsigned BAUD   = 9_600
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx,
  output logic       byte_ready,
  output logic [7:0] data_buffer
);

  localparam int unsigned CLKS_PER_BIT = CLK_HZ / BAUD;
  localparam int unsigned HALF_BIT     = CLKS_PER_BIT / 2;
  localparam int unsigned CNT_W        = $clog2(CLKS_PER_BIT + 1);

  typedef enum logic [1:0] {IDLE, START, DATA, STOP} rx_state_e;

  // Two-flop synchroniser; the line idles high.
  logic rx_meta, rx_s, rx_prev;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_meta <= 1'b1;
      rx_s    <= 1'b1;
      rx_prev <= 1'b1;
    end else begin
      rx_meta <= rx;
      rx_s    <= rx_meta;
      rx_prev <= rx_s;
    end
  end
  wire start_edge = rx_prev && !rx_s;

  // ---------------- Process 1: frame timing ----------------
  rx_state_e        state;
  logic [CNT_W-1:0] cnt;
  logic [2:0]       bit_idx;
  logic             bit_capture;   // centre of a data bit: store rx_s
  logic             stop_ok;       // centre of a high stop bit: byte done

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= IDLE;
      cnt         <= '0;
      bit_idx     <= '0;
      bit_capture <= 1'b0;
      stop_ok     <= 1'b0;
    end else begin
      bit_capture <= 1'b0;
      stop_ok     <= 1'b0;
      unique case (state)
        IDLE: begin
          cnt     <= '0;
          bit_idx <= '0;
          if (start_edge) state <= START;
        end
        START: begin
          if (cnt == CNT_W'(HALF_BIT - 1)) begin
            cnt   <= '0;
            state <= rx_s ? IDLE : DATA;   // a short low pulse is a glitch
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        DATA: begin
          if (cnt == CNT_W'(CLKS_PER_BIT - 1)) begin
            cnt         <= '0;
            bit_capture <= 1'b1;
            bit_idx     <= bit_idx + 1'b1;
            if (bit_idx == 3'd7) state <= STOP;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        STOP: begin
          if (cnt == CNT_W'(CLKS_PER_BIT - 1)) begin
            cnt     <= '0;
            stop_ok <= rx_s;               // framing error: drop the byte
            state   <= IDLE;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  // The bit is sampled together with the flag so that Process 2 stores the
  // value seen at the bit centre.
  logic bit_value;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bit_value <= 1'b1;
    else        bit_value <= rx_s;
  end

  // ---------------- Process 2: byte assembly ----------------
  logic [7:0] shift_buf;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shift_buf   <= '0;
      data_buffer <= '0;
      byte_ready  <= 1'b0;
    end else begin
      byte_ready <= 1'b0;
      // byte_ready is a single-cycle pulse: a byte is never reported twice.
      a_ready_pulse: assert (!(byte_ready && stop_ok));
      if (bit_capture) shift_buf <= {bit_value, shift_buf[7:1]};  // LSB first
      if (stop_ok) begin
        data_buffer <= shift_buf;
        byte_ready  <= 1'b1;
      end
    end
  end

endmodule
