// tb_pio_in: the port value is registered and read back at offset 0 one
// cycle after it changes; other offsets and idle cycles read 0.
//
// The stimulus and the reference computations are this testbench's own;
// the behaviour it checks is the one the design specifies.
module tb_pio_in;
  logic clk = 0, reset_n = 0, read = 0;
  logic [15:0] in_port;
  logic [1:0] address;
  logic [31:0] readdata;
  int checks = 0, failures = 0;
  pio_in #(.WIDTH(16)) dut (.clk, .reset_n, .in_port, .address, .read, .readdata);
  always #5 clk = ~clk;
  initial begin
    in_port = 16'h1234; address = 0;
    repeat (2) @(negedge clk);
    read = 1; #1;
    checks++; if (readdata != 0) begin failures++; $display("FAIL reset value %h", readdata); end
    reset_n = 1;
    @(negedge clk);
    repeat (50) begin
      logic [15:0] v, prev;
      prev = in_port;
      v = prev ^ (16'($urandom) | 16'h1);
      @(negedge clk); in_port = v; read = 1; address = 0;
      #1; checks++; if (readdata != {16'd0, prev}) begin failures++; $display("FAIL not registered: %h", readdata); end
      @(negedge clk); #1;
      checks++; if (readdata != {16'd0, v}) begin failures++; $display("FAIL read %h expected %h", readdata, v); end
      address = 2'($urandom_range(1, 3)); #1;
      checks++; if (readdata != 0) begin failures++; $display("FAIL offset %0d reads %h", address, readdata); end
      address = 0; read = 0; #1;
      checks++; if (readdata != 0) begin failures++; $display("FAIL idle bus reads %h", readdata); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
