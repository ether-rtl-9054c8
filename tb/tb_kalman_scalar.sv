// tb_kalman_scalar: drives one filter with 1500 samples of a noisy ramp
// that crosses both ends of the 0..180 degree range, with injected 20-45
// degree spikes and a stretch in bypass mode, and compares every estimate,
// the covariance, the convergence flag and the adaptive-R flags with the
// integer reference model. Checks the latency of every sample: 25 clock
// edges from the edge that samples `start` to the edge that samples `done`
// (3 for the first sample, 2 in bypass), and that a start during
// processing is ignored. Counts how often hard rejection, soft scaling,
// clamping, bypass and convergence occurred; each must occur.
//
// The 25-edge latency it checks is the one specified for the filter core;
// the trajectories and parameter sets are this testbench's own.
module tb_kalman_scalar;
  import ether_pkg::*;
  logic clk = 0, reset_n = 0, start = 0, enable = 1;
  q97_t measurement, q_param, r_param, estimate, p_est, k_gain, innov_avg, r_eff;
  logic done, converged, error, hard_reject, soft_scaled;
  logic [15:0] sample_count;
  int checks = 0, failures = 0;
  int n_hard = 0, n_soft = 0, n_clamp = 0, n_bypass = 0, n_conv = 0;

  kalman_scalar dut (.clk, .reset_n, .start, .enable, .measurement, .q_param, .r_param,
    .estimate, .done, .converged, .error, .sample_count, .p_est, .k_gain, .innov_avg, .r_eff,
    .hard_reject, .soft_scaled);
  always #5 clk = ~clk;

  `include "kalman_ref.svh"
  kstate_t ref_s;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic sample(input int z, input bit en, input bit extra_start);
    int lat, exp_lat, e;
    bit was_init;
    was_init = ref_s.init;
    @(negedge clk);
    measurement = q97_t'(z); enable = en; start = 1;
    @(posedge clk);
    lat = 0;
    @(negedge clk) start = 0;
    if (extra_start) begin      // a second start while busy must be ignored
      @(posedge clk); lat++;
      @(negedge clk) start = 1;
      @(posedge clk); lat++;
      @(negedge clk) start = 0;
    end
    do begin @(posedge clk); lat++; end while (!done && lat < 100);
    e = step(ref_s, z, int'(q_param), int'(r_param), en);
    exp_lat = !en ? 2 : !was_init ? 3 : 25;
    check(lat == exp_lat, $sformatf("latency %0d expected %0d", lat, exp_lat));
    check(int'(estimate) == e, $sformatf("z=%0d estimate %0d expected %0d", z, estimate, e));
    if (en && was_init) begin
      check(int'(p_est) == ref_s.p, $sformatf("P %0d expected %0d", p_est, ref_s.p));
      check(int'(innov_avg) == ref_s.avg, $sformatf("innov_avg %0d expected %0d", innov_avg, ref_s.avg));
      check(converged == ref_s.conv, "converged flag");
      check(hard_reject == ref_s.is_hard && soft_scaled == ref_s.is_soft, "adaptive-R flags");
      if (hard_reject) n_hard++;
      if (soft_scaled) n_soft++;
      if (converged)   n_conv++;
    end
    if (!en) n_bypass++;
    if (e == 0 || e == 23040) n_clamp++;
    // the ignored extra start must not begin another sample
    if (extra_start) begin
      repeat (30) @(posedge clk);
      check(!done, "start during processing was not ignored");
    end
  endtask

  initial begin
    int truth, noise, z;
    reset_state(ref_s);
    measurement = 0; q_param = 16'sd2; r_param = 16'sd512;
    repeat (3) @(posedge clk);
    reset_n = 1;
    for (int i = 0; i < 1500; i++) begin
      bit en;
      // ramp from -10 to 190 degrees and back
      truth = (i < 750) ? (-1280 + i * 34) : (-1280 + (1500 - i) * 34);
      noise = int'($urandom_range(0, 512)) - 256;           // +-2 degrees
      z = truth + noise;
      if (i % 97 == 50) z = z + ((i % 2) ? 1 : -1) * int'($urandom_range(2560, 5760));  // 20..45 deg spike
      en = !(i >= 600 && i < 640);
      sample(z, en, en && (i % 211 == 5));
    end
    // saturating innovation sets the error flag
    sample(-32768, 1, 0);
    check(error, "error flag on saturated innovation");
    check(int'(sample_count) == ref_s.count, $sformatf("sample_count %0d expected %0d", sample_count, ref_s.count));
    $display("mechanisms: hard=%0d soft=%0d clamp=%0d bypass=%0d converged=%0d", n_hard, n_soft, n_clamp, n_bypass, n_conv);
    check(n_hard > 0, "hard rejection never happened");
    check(n_soft > 0, "soft scaling never happened");
    check(n_clamp > 0, "clamping never happened");
    check(n_bypass > 0, "bypass never happened");
    check(n_conv > 0, "convergence never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
