// tb_fp_divide_fast: checks the Kalman-gain divider. For random proper
// fractions num/den the Q9.7 quotient must equal floor(num*128/den); the
// corner cases (num >= den, den <= 0, num < 0) give 1.0, 0 with err, 0 with
// err; exact quotients (num = j*m, den = 128*m) are tried as well. The
// latency from the edge that samples `start` to the edge that samples
// `done` must be 18 edges, and `done` must be a one-cycle pulse.
//
// The stimulus and the reference computations are this testbench's own;
// the behaviour it checks is the one the design specifies.
module tb_fp_divide_fast;
  import ether_pkg::*;
  logic clk = 0, reset_n = 0, start = 0;
  q97_t num, den, quotient;
  logic done, busy, err;
  int checks = 0, failures = 0;

  fp_divide_fast dut (.clk, .reset_n, .start, .num, .den, .quotient, .done, .busy, .err);
  always #5 clk = ~clk;

  task automatic run(input int n, input int d);
    int lat, e, e_err;
    @(negedge clk);
    num = q97_t'(n); den = q97_t'(d); start = 1;
    @(posedge clk);            // edge that samples start
    lat = 0;
    @(negedge clk) start = 0;
    do begin @(posedge clk); lat++; end while (!done);
    if (n < 0 || d <= 0) begin e = 0; e_err = 1; end
    else if (n >= d)     begin e = 128; e_err = 0; end
    else                 begin e = (n * 128) / d; e_err = 0; end
    checks++;
    if (int'(quotient) != e || err != e_err) begin
      failures++;
      $display("FAIL div %0d/%0d = %0d err=%0b expected %0d err=%0b", n, d, quotient, err, e, e_err);
    end
    checks++;
    if (lat != 18) begin
      failures++;
      $display("FAIL latency %0d, expected 18", lat);
    end
    @(posedge clk);
    checks++;
    if (done) begin failures++; $display("FAIL done longer than one cycle"); end
  endtask

  initial begin
    num = 0; den = 1;
    repeat (3) @(posedge clk);
    reset_n = 1;
    run(256, 384);      // 2/(2+1) = 0.666 -> 85
    run(1, 32767);
    run(32766, 32767);
    run(100, 100);      // equal -> 1.0
    run(300, 100);      // num > den -> 1.0
    run(100, 0);        // divide by zero
    run(-5, 100);       // negative numerator
    repeat (300) begin
      int d, n;
      d = $urandom_range(1, 32767);
      n = $urandom_range(0, d - 1);
      run(n, d);
    end
    // exact quotients: num = j * m, den = 128 * m gives exactly j/128
    repeat (100) begin
      int m, j;
      m = $urandom_range(1, 255);
      j = $urandom_range(1, 127);
      run(j * m, 128 * m);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
