// uart_rx: 8N1 serial receiver.
//
// The line is synchronised by two flip-flops. A falling edge while idle
// starts a frame; the line is sampled in the middle of the start bit (to
// reject glitches), then in the middle of each of the eight data bits (LSB
// first) and of the stop bit. `divisor` is the bit time in clock cycles
// (CLK_HZ / BAUD, 434 for 115200 baud at 50 MHz). At the end of the stop
// bit's sample `valid` pulses for one cycle with `data`; `frame_err` pulses
// instead of `valid` if the stop bit was low.
//
// 8N1 framing at a programmable bit time is as specified; mid-bit sampling,
// the start-bit re-check and the input synchroniser are this design's
// choice.
module uart_rx (
  input  logic        clk,
  input  logic        reset_n,
  input  logic [15:0] divisor,
  input  logic        rxd,
  output logic [7:0]  data,
  output logic        valid,
  output logic        frame_err
);
  typedef enum logic [1:0] {R_IDLE, R_START, R_DATA, R_STOP} rstate_t;
  rstate_t state;
  logic s1, s2;
  logic [15:0] cnt;
  logic [2:0]  bit_idx;
  logic [7:0]  shreg;

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      s1 <= 1'b1;
      s2 <= 1'b1;
    end else begin
      s1 <= rxd;
      s2 <= s1;
    end
  end

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      state     <= R_IDLE;
      cnt       <= '0;
      bit_idx   <= '0;
      shreg     <= '0;
      data      <= '0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      valid     <= 1'b0;
      frame_err <= 1'b0;
      unique case (state)
        R_IDLE: if (!s2) begin
          cnt   <= {1'b0, divisor[15:1]};   // half a bit to the middle
          state <= R_START;
        end
        R_START: if (cnt == 16'd0) begin
          if (!s2) begin
            cnt     <= divisor - 16'd1;
            bit_idx <= '0;
            state   <= R_DATA;
          end else begin
            state <= R_IDLE;                 // glitch, not a start bit
          end
        end else cnt <= cnt - 16'd1;
        R_DATA: if (cnt == 16'd0) begin
          shreg <= {s2, shreg[7:1]};
          cnt   <= divisor - 16'd1;
          if (bit_idx == 3'd7) state <= R_STOP;
          bit_idx <= bit_idx + 3'd1;
        end else cnt <= cnt - 16'd1;
        R_STOP: if (cnt == 16'd0) begin
          if (s2) begin
            data  <= shreg;
            valid <= 1'b1;
          end else begin
            frame_err <= 1'b1;
          end
          state <= R_IDLE;
        end else cnt <= cnt - 16'd1;
        default: state <= R_IDLE;
      endcase
    end
  end
endmodule
