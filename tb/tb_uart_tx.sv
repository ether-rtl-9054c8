// tb_uart_tx: sends random bytes with a divisor of 16 and decodes the line
// by sampling each bit in its middle; checks start bit, data bits LSB
// first, stop bit, and that the whole frame lasts 10 bit times.
//
// The stimulus and the reference computations are this testbench's own;
// the behaviour it checks is the one the design specifies.
module tb_uart_tx;
  localparam int DIV = 16;
  logic clk = 0, reset_n = 0, start = 0, busy, txd;
  logic [7:0] data;
  int checks = 0, failures = 0;
  uart_tx dut (.clk, .reset_n, .divisor(16'(DIV)), .start, .data, .busy, .txd);
  always #5 clk = ~clk;

  task automatic send_and_check(input logic [7:0] b);
    logic [7:0] got;
    int t;
    @(negedge clk); data = b; start = 1;
    @(negedge clk); start = 0;
    t = 0;
    while (txd) begin @(posedge clk); t++; if (t > 10) break; end
    checks++; if (txd) begin failures++; $display("FAIL no start bit"); return; end
    repeat (DIV/2) @(posedge clk);
    checks++; if (txd) begin failures++; $display("FAIL start bit not low in middle"); end
    for (int i = 0; i < 8; i++) begin
      repeat (DIV) @(posedge clk);
      got[i] = txd;
    end
    repeat (DIV) @(posedge clk);
    checks++; if (!txd) begin failures++; $display("FAIL stop bit low"); end
    checks++; if (got != b) begin failures++; $display("FAIL sent %h decoded %h", b, got); end
    t = 0;
    while (busy) begin @(posedge clk); t++; end
    checks++; if (t > DIV) begin failures++; $display("FAIL busy %0d cycles after stop middle", t); end
  endtask

  initial begin
    data = 0;
    repeat (3) @(posedge clk);
    reset_n = 1;
    repeat (3) @(posedge clk);
    checks++; if (!txd || busy) begin failures++; $display("FAIL idle line not high"); end
    send_and_check(8'h55); send_and_check(8'h00); send_and_check(8'hFF); send_and_check(8'h81);
    repeat (20) send_and_check(8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
