// uart_tx: 8N1 serial transmitter.
//
// When idle and `start` is high, `data` is loaded and sent as a start bit
// (low), eight data bits LSB first and one stop bit (high), each `divisor`
// clock cycles long. `busy` is high from the cycle after `start` until the
// stop bit has lasted its full bit time; the line idles high.
//
// 8N1 framing is as specified; the shift-register structure is this design's
// choice.
module uart_tx (
  input  logic        clk,
  input  logic        reset_n,
  input  logic [15:0] divisor,
  input  logic        start,
  input  logic [7:0]  data,
  output logic        busy,
  output logic        txd
);
  logic [9:0]  shreg;   // stop, data[7:0], start; shifted out LSB first
  logic [3:0]  bits_left;
  logic [15:0] cnt;

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      busy      <= 1'b0;
      shreg     <= '1;
      bits_left <= '0;
      cnt       <= '0;
      txd       <= 1'b1;
    end else if (!busy) begin
      txd <= 1'b1;
      if (start) begin
        shreg     <= {1'b1, data, 1'b0};
        bits_left <= 4'd10;
        cnt       <= '0;
        busy      <= 1'b1;
      end
    end else if (cnt != 16'd0) begin
      cnt <= cnt - 16'd1;
    end else if (bits_left == 4'd0) begin
      busy <= 1'b0;
    end else begin
      txd       <= shreg[0];
      shreg     <= {1'b1, shreg[9:1]};
      bits_left <= bits_left - 4'd1;
      cnt       <= divisor - 16'd1;
    end
  end
endmodule
