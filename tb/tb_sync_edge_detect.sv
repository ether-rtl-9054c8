// tb_sync_edge_detect: a held level gives exactly one `rise` pulse, three
// edges after the input rises; `level` follows after two edges; short
// pulses each give one `rise`. A final random phase drives the input
// with random levels and compares both outputs, every cycle, with a
// delay-line model (level = input two edges ago, rise = level rose one
// edge ago).
//
// The stimulus and the reference computations are this testbench's own.
module tb_sync_edge_detect;
  logic clk = 0, reset_n = 0, async_in = 0, level, rise;
  int checks = 0, failures = 0, rises;
  sync_edge_detect dut (.clk, .reset_n, .async_in, .level, .rise);
  always #5 clk = ~clk;
  always @(posedge clk) if (rise) rises++;

  initial begin
    rises = 0;
    repeat (3) @(posedge clk);
    reset_n = 1;
    @(negedge clk) async_in = 1;
    @(posedge clk); #1; checks++; if (level)  begin failures++; $display("FAIL level after 1 edge"); end
    @(posedge clk); #1; checks++; if (!level) begin failures++; $display("FAIL level after 2 edges"); end
    checks++; if (rise) begin failures++; $display("FAIL rise early"); end
    @(posedge clk); #1; checks++; if (!rise) begin failures++; $display("FAIL no rise after 3 edges"); end
    repeat (20) @(posedge clk);
    checks++; if (rises != 1) begin failures++; $display("FAIL %0d rises for one held level", rises); end
    @(negedge clk) async_in = 0;
    repeat (5) @(posedge clk);
    rises = 0;
    repeat (4) begin
      @(negedge clk) async_in = 1;
      repeat (3) @(negedge clk);
      async_in = 0;
      repeat (3) @(negedge clk);
    end
    repeat (5) @(posedge clk);
    checks++; if (rises != 4) begin failures++; $display("FAIL %0d rises for 4 pulses", rises); end
    // random phase against a delay-line model
    begin
      logic [2:0] hist;   // input sampled at the last three edges
      logic exp_rise;
      hist = {3{async_in}};
      exp_rise = 0;
      repeat (2000) begin
        @(negedge clk) if ($urandom_range(0, 3) == 0) async_in = ~async_in;
        @(posedge clk);
        exp_rise = hist[1] & ~hist[2];   // computed from the stages before this edge
        hist = {hist[1:0], async_in};
        #1;
        checks++;
        if (level != hist[1] || rise != exp_rise) begin
          failures++;
          if (failures < 10) $display("FAIL random: level %0b/%0b rise %0b/%0b", level, hist[1], rise, exp_rise);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
