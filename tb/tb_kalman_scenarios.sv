// tb_kalman_scenarios: the seven evaluation scenarios of the filter, 5000
// samples each, run through kalman_filter_top at its default parameters.
//
// Each run drives the azimuth filter with one scenario and the elevation
// filter with its mirror image (a 0->180 degree incline on azimuth, the
// matching 180->0 decline on elevation), so the seven scenarios take four
// runs: normal noise, transient spikes of 20-45 degrees, very noisy (4
// degrees plus 3 % random large spikes) and sudden changes (six
// legitimate jumps of 20-60 degrees between gradual segments, azimuth
// only). The noise is uniform, +-2 degrees (+-4 when very noisy), which
// gives raw errors of about 1.15 and 2.3 degrees RMS.
// The filters are reset between runs. Every output is compared with the
// integer model in kalman_ref.svh, and the RMSE of the raw and filtered
// angles against the noise-free trajectory is printed with the reduction
// (1 - filtered/raw). A check fails if filtering does not lower the RMSE
// of a noise-only scenario. Q and R are this test's choice, Q = 8/128 and
// R = 2.0 (Q9.7), and can be changed with +Q=<lsb> and +R=<lsb>. In the
// sudden-change run the number of samples until the estimate is within
// 2 degrees of the new position is printed for each jump. The filter holds
// its estimate after such a jump (hard rejection) and recovers only slowly,
// so that run checks the outputs against the model only.
module tb_kalman_scenarios;
  import ether_pkg::*;
  `include "kalman_ref.svh"
  localparam int N = 5000;
  logic clk = 0, reset_n = 0, enable = 1, valid = 0;
  q97_t az_raw = 0, el_raw = 0, az_f, el_f;
  q97_t q_param, r_param;
  logic fvalid, conv, tmo, ferr, azh, elh, azs, els;
  int checks = 0, failures = 0;
  kstate_t ref_az, ref_el;

  kalman_filter_top dut (.sys_clk(clk), .reset_n, .enable, .angle_data_valid(valid),
    .azimuth_raw(az_raw), .elevation_raw(el_raw), .q_param, .r_param,
    .filtered_valid(fvalid), .azimuth_filtered(az_f), .elevation_filtered(el_f),
    .filter_converged(conv), .timeout_error(tmo), .filter_error(ferr),
    .az_hard_reject(azh), .el_hard_reject(elh), .az_soft_scaled(azs), .el_soft_scaled(els));
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  function automatic int noise(int amp_lsb);     // uniform in [-amp, +amp]
    return int'($urandom_range(0, 2 * amp_lsb)) - amp_lsb;
  endfunction

  task automatic pair(input int za, input int ze, output int fa, output int fe);
    int t = 0, ea, ee;
    @(negedge clk);
    az_raw = q97_t'(za); el_raw = q97_t'(ze); valid = 1;
    do begin @(posedge clk); t++; end while (!fvalid && t < 100);
    @(negedge clk) valid = 0;
    repeat (6) @(posedge clk);
    ea = step(ref_az, za, int'(q_param), int'(r_param), 1'b1);
    ee = step(ref_el, ze, int'(q_param), int'(r_param), 1'b1);
    check(t < 100 && int'(az_f) == ea && int'(el_f) == ee,
          $sformatf("got %0d %0d expected %0d %0d", az_f, el_f, ea, ee));
    fa = int'(az_f); fe = int'(el_f);
  endtask

  // kind: 0 normal, 1 spikes, 2 very noisy, 3 sudden changes
  task automatic run(input int kind, input string name_a, input string name_e);
    real sr_a = 0, sf_a = 0, sr_e = 0, sf_e = 0, ra, fa_r, re, fe_r;
    int ia, ie, za, ze, fa, fe, jump, t_jump;
    bit settling;
    reset_n = 0; repeat (3) @(posedge clk); reset_n = 1;
    reset_state(ref_az); reset_state(ref_el);
    jump = 0; t_jump = 0; settling = 0;
    for (int i = 0; i < N; i++) begin
      ia = (i * 23040) / (N - 1);             // 0 -> 180 degrees
      ie = 23040 - ia;                        // 180 -> 0 degrees
      if (kind == 3) begin
        if (i % 700 == 350 && i < 4500) begin
          jump = (jump == 0) ? int'($urandom_range(20, 60)) * 128 : 0;
          t_jump = i; settling = 1;
        end
        ia = 60 * 128 + (i * 60 * 128) / N + jump;
        ie = 45 * 128;
      end
      za = ia + noise(kind == 2 ? 512 : 256);
      ze = ie + noise(kind == 2 ? 512 : 256);
      if (kind == 1 && i % 500 == 250) begin za += int'($urandom_range(20, 45)) * 128; ze -= int'($urandom_range(20, 45)) * 128; end
      if (kind == 2 && $urandom_range(0, 99) < 3) za += (($urandom_range(0, 1) != 0) ? 1 : -1) * int'($urandom_range(10, 30)) * 128;
      if (kind == 2 && $urandom_range(0, 99) < 3) ze += (($urandom_range(0, 1) != 0) ? 1 : -1) * int'($urandom_range(10, 30)) * 128;
      za = clamp180(za); ze = clamp180(ze);
      pair(za, ze, fa, fe);
      if (settling && (fa - ia < 256) && (ia - fa < 256)) begin
        $display("  jump at sample %0d: within 2 deg after %0d samples", t_jump, i - t_jump);
        settling = 0;
      end
      sr_a += real'((za - ia) ** 2); sf_a += real'((fa - ia) ** 2);
      sr_e += real'((ze - ie) ** 2); sf_e += real'((fe - ie) ** 2);
    end
    ra = $sqrt(sr_a / N) / 128.0; fa_r = $sqrt(sf_a / N) / 128.0;
    re = $sqrt(sr_e / N) / 128.0; fe_r = $sqrt(sf_e / N) / 128.0;
    $display("%-22s raw RMSE %6.2f deg  filtered %6.2f deg  reduction %5.1f %%", name_a, ra, fa_r, 100.0 * (1.0 - fa_r / ra));
    if (kind != 3) begin
      $display("%-22s raw RMSE %6.2f deg  filtered %6.2f deg  reduction %5.1f %%", name_e, re, fe_r, 100.0 * (1.0 - fe_r / re));
      check(fa_r < ra && fe_r < re, {name_a, ": filtering did not reduce the error"});
    end
  endtask

  initial begin
    if (!$value$plusargs("Q=%d", q_param)) q_param = 16'sd8;
    if (!$value$plusargs("R=%d", r_param)) r_param = 16'sd256;
    repeat (3) @(posedge clk);
    run(0, "incline normal noise", "decline normal noise");
    run(1, "incline with spikes", "decline with spikes");
    run(2, "incline very noisy", "decline very noisy");
    run(3, "sudden changes", "");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (2_000_000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
