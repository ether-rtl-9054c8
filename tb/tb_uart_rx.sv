// tb_uart_rx: drives 8N1 frames with a divisor of 32 (the bit time of the
// driver is varied by -1..+1 cycle, about 3%, to model baud mismatch), checks the received
// bytes, a framing error for a frame with a low stop bit, and that a short
// glitch is not taken as a start bit.
//
// The stimulus and the reference computations are this testbench's own;
// the behaviour it checks is the one the design specifies.
module tb_uart_rx;
  localparam int DIV = 32;
  logic clk = 0, reset_n = 0, rxd = 1, valid, frame_err;
  logic [7:0] data;
  int checks = 0, failures = 0;
  int nvalid = 0, nferr = 0;
  logic [7:0] last;
  uart_rx dut (.clk, .reset_n, .divisor(16'(DIV)), .rxd, .data, .valid, .frame_err);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (valid) begin nvalid++; last = data; end
    if (frame_err) nferr++;
  end

  task automatic drive(input logic [7:0] b, input logic stop, input int bt);
    rxd = 0; repeat (bt) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (bt) @(negedge clk); end
    rxd = stop; repeat (bt) @(negedge clk);
    rxd = 1; repeat (bt) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    reset_n = 1;
    repeat (5) @(negedge clk);
    for (int k = 0; k < 40; k++) begin
      logic [7:0] b;
      int n0;
      b = 8'($urandom);
      n0 = nvalid;
      drive(b, 1'b1, DIV - 1 + (k % 3));
      checks++;
      if (nvalid != n0 + 1 || last != b) begin failures++; $display("FAIL sent %h got %h (%0d valid)", b, last, nvalid - n0); end
    end
    drive(8'hA5, 1'b0, DIV);
    checks++; if (nferr != 1) begin failures++; $display("FAIL framing error not flagged"); end
    begin
      int n0;
      n0 = nvalid;
      rxd = 0; repeat (3) @(negedge clk); rxd = 1;
      repeat (20 * DIV) @(negedge clk);
      checks++; if (nvalid != n0 || nferr != 1) begin failures++; $display("FAIL glitch taken as a frame"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
