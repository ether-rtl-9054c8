// uart_avalon: RS-232 UART (8N1) with FIFOs and an Avalon-MM register slave.
//
// Received bytes go into an RX FIFO and bytes to send come from a TX FIFO,
// each FIFO_DEPTH bytes deep. Registers (byte offsets):
//   0x0 RXDATA  read : oldest received byte in [7:0]; the read removes it
//   0x4 TXDATA  write: [7:0] queued for transmission (dropped if full)
//   0x8 STATUS  read : [7] RRDY receive data available, [6] TRDY transmit
//                      FIFO has room, [3] ROE receive overrun, [1] FE framing
//                      error; a write clears ROE and FE
//   0xC CONTROL r/w  : [31:16] baud divisor (clock cycles per bit, reset
//                      value CLK_HZ/BAUD), [7] RRDY interrupt enable,
//                      [6] TRDY interrupt enable
// `irq` is high while an enabled RRDY/TRDY condition holds.
// Bus timing: every access has one wait state; `waitrequest` is high in the
// first cycle of a request and low in the second, when read data is valid.
//
// The register names and offsets, 115200 baud, 8N1 and FIFOs of a few bytes
// follow the system description; the bit positions in STATUS and CONTROL and
// the programmable divisor are this design's choice. No parity is supported.
module uart_avalon #(
  parameter int unsigned CLK_HZ     = 50_000_000,
  parameter int unsigned BAUD       = 115_200,
  parameter int unsigned FIFO_DEPTH = 8
) (
  input  logic clk,
  input  logic reset_n,
  avalon_mm_if.slave s,
  input  logic rxd,
  output logic txd,
  output logic irq
);
  import ether_pkg::*;
  localparam logic [15:0] DIV_RESET = 16'((CLK_HZ + BAUD / 2) / BAUD);
  localparam int unsigned CW = $clog2(FIFO_DEPTH) + 1;

  logic [15:0] divisor;
  logic        ie_rrdy, ie_trdy, roe, fe;
  logic        ack_q;
  logic        access, rd_ok, wr_ok;
  logic [1:0]  reg_sel;

  assign access  = s.read || s.write;
  assign s.waitrequest = access && !ack_q;
  assign rd_ok   = s.read  && ack_q;
  assign wr_ok   = s.write && ack_q;
  assign reg_sel = s.address[3:2];

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) ack_q <= 1'b0;
    else          ack_q <= access && !ack_q;
  end

  // receive path
  logic [7:0] rx_byte, rx_dout;
  logic rx_valid, rx_ferr, rx_empty, rx_full;
  logic [CW-1:0] rx_count;
  uart_rx u_rx (.clk, .reset_n, .divisor, .rxd, .data(rx_byte), .valid(rx_valid), .frame_err(rx_ferr));
  sync_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_rx_fifo (
    .clk, .reset_n, .push(rx_valid), .din(rx_byte),
    .pop(rd_ok && reg_sel == 2'd0), .dout(rx_dout), .empty(rx_empty), .full(rx_full), .count(rx_count));

  // transmit path
  logic [7:0] tx_dout;
  logic tx_empty, tx_full, tx_busy, tx_start;
  logic [CW-1:0] tx_count;
  sync_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_tx_fifo (
    .clk, .reset_n, .push(wr_ok && reg_sel == 2'd1), .din(s.writedata[7:0]),
    .pop(tx_start), .dout(tx_dout), .empty(tx_empty), .full(tx_full), .count(tx_count));
  assign tx_start = !tx_empty && !tx_busy;
  uart_tx u_tx (.clk, .reset_n, .divisor, .start(tx_start), .data(tx_dout), .busy(tx_busy), .txd);

  logic [31:0] status;
  always_comb begin
    status          = '0;
    status[ST_RRDY] = !rx_empty;
    status[ST_TRDY] = !tx_full;
    status[ST_ROE]  = roe;
    status[ST_FE]   = fe;
  end

  always_comb begin
    unique case (reg_sel)
      2'd0:    s.readdata = {24'd0, rx_empty ? 8'd0 : rx_dout};
      2'd2:    s.readdata = status;
      2'd3:    s.readdata = {divisor, 8'd0, ie_rrdy, ie_trdy, 6'd0};
      default: s.readdata = '0;
    endcase
  end

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      divisor <= DIV_RESET;
      ie_rrdy <= 1'b0;
      ie_trdy <= 1'b0;
      roe     <= 1'b0;
      fe      <= 1'b0;
    end else begin
      if (rx_valid && rx_full) roe <= 1'b1;
      if (rx_ferr)             fe  <= 1'b1;
      if (wr_ok && reg_sel == 2'd2) begin
        roe <= 1'b0;
        fe  <= 1'b0;
      end
      if (wr_ok && reg_sel == 2'd3) begin
        if (s.byteenable[3:2] == 2'b11 && s.writedata[31:16] != 16'd0) divisor <= s.writedata[31:16];
        ie_rrdy <= s.writedata[7];
        ie_trdy <= s.writedata[6];
      end
    end
  end

  assign irq = (ie_rrdy && !rx_empty) || (ie_trdy && !tx_full);
endmodule
