// tb_sync_fifo: random pushes and pops against a queue model; checks data
// order, empty/full/count, and that pushes when full are dropped.
//
// The stimulus and the reference computations are this testbench's own;
// the behaviour it checks is the one the design specifies.
module tb_sync_fifo;
  logic clk = 0, reset_n = 0, push = 0, pop = 0;
  logic [7:0] din, dout;
  logic empty, full;
  logic [3:0] count;
  int checks = 0, failures = 0;
  byte unsigned model[$];
  int full_seen = 0, empty_pop = 0;

  sync_fifo #(.WIDTH(8), .DEPTH(8)) dut (.clk, .reset_n, .push, .din, .pop, .dout, .empty, .full, .count);
  always #5 clk = ~clk;

  initial begin
    din = 0;
    repeat (3) @(posedge clk);
    reset_n = 1;
    repeat (3000) begin
      @(negedge clk);
      checks++;
      if (empty != (model.size() == 0) || full != (model.size() == 8) || int'(count) != model.size()) begin
        failures++;
        $display("FAIL flags: empty=%0b full=%0b count=%0d model=%0d", empty, full, count, model.size());
      end
      if (model.size() != 0) begin
        checks++;
        if (dout != model[0]) begin failures++; $display("FAIL dout %h expected %h", dout, model[0]); end
      end
      push = ($urandom_range(0, 99) < 55);
      pop  = ($urandom_range(0, 99) < 45);
      din  = 8'($urandom);
      @(posedge clk);
      begin
        int sz;
        sz = model.size();
        if (pop && sz != 0) void'(model.pop_front());
        else if (pop) empty_pop++;
        if (push && sz < 8) model.push_back(din);
        else if (push) full_seen++;
      end
      #1;
    end
    checks++;
    if (full_seen == 0 || empty_pop == 0) begin failures++; $display("FAIL full or empty never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
