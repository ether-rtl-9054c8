// tb_fp_multiply: checks the Q9.7 multiplier (product >> 7, floored, then
// saturated) against integer arithmetic on corner values and random pairs.
//
// The stimulus and the reference computations are this testbench's own;
// the behaviour it checks is the one the design specifies.
module tb_fp_multiply;
  import ether_pkg::*;
  q97_t a, b, y;
  logic ovf;
  int checks = 0, failures = 0;
  fp_multiply dut (.a, .b, .y, .ovf);

  task automatic check(input int va, input int vb);
    longint p, s, e;
    a = q97_t'(va); b = q97_t'(vb);
    #1;
    p = longint'(va) * longint'(vb);
    // floor division by 128
    s = (p >= 0) ? p / 128 : -((-p + 127) / 128);
    e = (s > 32767) ? 32767 : (s < -32768) ? -32768 : s;
    checks++;
    if (longint'(y) != e || ovf != (s != e)) begin
      failures++;
      $display("FAIL mul %0d * %0d = %0d ovf=%0b, expected %0d", va, vb, y, ovf, e);
    end
  endtask

  initial begin
    check(128, 128);      // 1.0 * 1.0
    check(256, 64);       // 2.0 * 0.5
    check(-128, 300);
    check(-1, 1);         // floors to -1
    check(32767, 32767);  // saturates high
    check(-32768, 32767); // saturates low
    check(64, 2560);      // 0.5 * 20
    repeat (2000) check(int'($signed(16'($urandom))), int'($signed(16'($urandom))));
    repeat (500)  check(int'($urandom_range(0, 128)), int'($signed(16'($urandom))));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
