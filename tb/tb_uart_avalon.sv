// tb_uart_avalon: the UART seen from its Avalon-MM port. Runs with a bit
// time of 16 clocks. Checks the reset value of the divisor in CONTROL,
// reception of serial frames into RXDATA with RRDY, transmission of bytes
// written to TXDATA (decoded from the line), the TRDY flag when the TX FIFO
// fills, the receive overrun flag and its clearing, the framing error flag,
// the interrupt enables, and the one-wait-state bus timing.
//
// The stimulus and the reference computations are this testbench's own;
// the behaviour it checks is the one the design specifies.
module tb_uart_avalon;
  import ether_pkg::*;
  localparam int DIV = 16;
  logic clk = 0, reset_n = 0, rxd = 1, txd, irq;
  int checks = 0, failures = 0;
  avalon_mm_if s (.clk, .reset_n);
  uart_avalon #(.CLK_HZ(DIV * 100_000), .BAUD(100_000), .FIFO_DEPTH(8)) dut (
    .clk, .reset_n, .s(s.slave), .rxd, .txd, .irq);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic bus(input logic wr, input logic [15:0] addr, input logic [31:0] wdata, output logic [31:0] rdata);
    int waits;
    @(negedge clk);
    s.address = addr; s.writedata = wdata; s.byteenable = 4'hF; s.read = !wr; s.write = wr;
    waits = 0;
    @(posedge clk);
    while (s.waitrequest) begin waits++; @(posedge clk); end
    rdata = s.readdata;
    #1 s.read = 0; s.write = 0;
    check(waits == 1, $sformatf("expected one wait state, saw %0d", waits));
  endtask

  task automatic send_serial(input logic [7:0] b, input logic stop);
    @(negedge clk);
    rxd = 0; repeat (DIV) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (DIV) @(negedge clk); end
    rxd = stop; repeat (DIV) @(negedge clk);
    rxd = 1; repeat (2) @(negedge clk);
  endtask

  // line decoder for the transmitter
  byte unsigned txq[$];
  initial begin
    forever begin
      logic [7:0] b;
      @(negedge txd);
      repeat (DIV / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin repeat (DIV) @(posedge clk); b[i] = txd; end
      repeat (DIV) @(posedge clk);
      if (txd) txq.push_back(b);
    end
  end

  initial begin
    logic [31:0] r;
    s.read = 0; s.write = 0; s.address = 0; s.writedata = 0; s.byteenable = 0;
    repeat (3) @(posedge clk);
    reset_n = 1;
    bus(0, UART_CONTROL, 0, r);
    check(r[31:16] == DIV, $sformatf("divisor reset value %0d", r[31:16]));
    bus(0, UART_STATUS, 0, r);
    check(!r[ST_RRDY] && r[ST_TRDY], "status after reset");
    // receive four bytes
    for (int i = 0; i < 4; i++) send_serial(8'h10 + 8'(i * 17), 1);
    for (int i = 0; i < 4; i++) begin
      bus(0, UART_STATUS, 0, r);
      check(r[ST_RRDY], "RRDY with data");
      bus(0, UART_RXDATA, 0, r);
      check(r[7:0] == 8'h10 + 8'(i * 17), $sformatf("rx byte %0d = %h", i, r[7:0]));
    end
    bus(0, UART_STATUS, 0, r);
    check(!r[ST_RRDY], "RRDY clear when empty");
    // interrupt on receive
    bus(1, UART_CONTROL, {16'd0, 8'h00, 8'h80}, r);
    check(!irq, "no irq while empty");
    send_serial(8'h3C, 1);
    check(irq, "irq with RRDY enabled");
    bus(0, UART_RXDATA, 0, r);
    check(r[7:0] == 8'h3C && !irq, "irq cleared by read");
    bus(1, UART_CONTROL, 32'd0, r);
    // transmit: fill the TX FIFO faster than the line drains it
    for (int i = 0; i < 10; i++) bus(1, UART_TXDATA, 32'(8'hA0 + i), r);
    bus(0, UART_STATUS, 0, r);
    check(!r[ST_TRDY], "TRDY low with full TX FIFO");
    repeat (12 * 10 * DIV) @(posedge clk);
    bus(0, UART_STATUS, 0, r);
    check(r[ST_TRDY], "TRDY back when drained");
    check(txq.size() >= 9, $sformatf("%0d bytes on the line", txq.size()));
    for (int i = 0; i < txq.size(); i++) check(txq[i] == 8'hA0 + 8'(i), $sformatf("tx byte %0d = %h", i, txq[i]));
    // overrun: 9 bytes into an 8-deep FIFO
    for (int i = 0; i < 9; i++) send_serial(8'(i), 1);
    bus(0, UART_STATUS, 0, r);
    check(r[ST_ROE], "overrun flagged");
    for (int i = 0; i < 8; i++) begin
      bus(0, UART_RXDATA, 0, r);
      check(r[7:0] == 8'(i), $sformatf("fifo byte %0d after overrun", i));
    end
    bus(1, UART_STATUS, 0, r);
    bus(0, UART_STATUS, 0, r);
    check(!r[ST_ROE], "overrun cleared by status write");
    // framing error
    send_serial(8'h77, 0);
    bus(0, UART_STATUS, 0, r);
    check(r[ST_FE] && !r[ST_RRDY], "framing error flagged, byte dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (300000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
