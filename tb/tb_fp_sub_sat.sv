// tb_fp_sub_sat: checks the saturating Q9.7 subtractor against integer
// arithmetic on directed corner values and 2000 random pairs.
//
// The stimulus and the reference computations are this testbench's own;
// the behaviour it checks is the one the design specifies.
module tb_fp_sub_sat;
  import ether_pkg::*;
  q97_t a, b, y;
  logic ovf;
  int checks = 0, failures = 0;
  fp_sub_sat dut (.a, .b, .y, .ovf);

  task automatic check(input int va, input int vb);
    int s, e;
    a = q97_t'(va); b = q97_t'(vb);
    #1;
    s = va - vb;
    e = (s > 32767) ? 32767 : (s < -32768) ? -32768 : s;
    checks++;
    if (int'(y) != e || ovf != (s != e)) begin
      failures++;
      $display("FAIL sub %0d - %0d = %0d ovf=%0b, expected %0d", va, vb, y, ovf, e);
    end
  endtask

  initial begin
    check(0, 0); check(128, 128); check(32767, 1); check(-32768, -1);
    check(23040, 23040); check(-100, 50); check(32767, -32768);
    repeat (2000) check(int'($signed(16'($urandom))), int'($signed(16'($urandom))));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
