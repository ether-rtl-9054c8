// tb_kalman_filter_top: drives the two-axis filter the way the bridge does
// (raw angles set, then `angle_data_valid` held high until
// `filtered_valid`), with independent noisy trajectories per axis, and
// compares both outputs with two copies of the integer reference model.
// Checks the valid-to-valid latency (30 edges from the edge that first
// samples `angle_data_valid` high to the edge that samples
// `filtered_valid`; the first pair and bypass pairs are shorter), that one
// held valid gives exactly one result, that `filter_converged` needs both
// axes, and the timeout timer, by running a second instance whose
// TIMEOUT_CYCLES is shorter than the filter latency.
//
// The 30-edge latency it checks is the 25-cycle filter core specified for
// the design plus this design's synchroniser and registers; the trajectories
// and the short-timeout second instance are this testbench's own.
module tb_kalman_filter_top;
  import ether_pkg::*;
  logic clk = 0, reset_n = 0, enable = 1, valid = 0;
  q97_t az_raw, el_raw, q_param, r_param, az_f, el_f;
  logic fvalid, conv, tmo, ferr, ferr2, azh, elh, azs, els;
  int checks = 0, failures = 0, nvalid = 0;
  int n_tmo = 0, n_conv = 0, n_bypass = 0, n_hard = 0;

  kalman_filter_top dut (.sys_clk(clk), .reset_n, .enable, .angle_data_valid(valid),
    .azimuth_raw(az_raw), .elevation_raw(el_raw), .q_param, .r_param,
    .filtered_valid(fvalid), .azimuth_filtered(az_f), .elevation_filtered(el_f),
    .filter_converged(conv), .timeout_error(tmo), .filter_error(ferr),
    .az_hard_reject(azh), .el_hard_reject(elh), .az_soft_scaled(azs), .el_soft_scaled(els));

  // second instance with a timer shorter than the filter: must time out
  logic fvalid2, conv2, tmo2, x1, x2, x3, x4;
  q97_t az2, el2;
  kalman_filter_top #(.TIMEOUT_CYCLES(10)) dut_tmo (.sys_clk(clk), .reset_n, .enable(1'b1),
    .angle_data_valid(valid), .azimuth_raw(az_raw), .elevation_raw(el_raw), .q_param, .r_param,
    .filtered_valid(fvalid2), .azimuth_filtered(az2), .elevation_filtered(el2),
    .filter_converged(conv2), .timeout_error(tmo2), .filter_error(ferr2),
    .az_hard_reject(x1), .el_hard_reject(x2), .az_soft_scaled(x3), .el_soft_scaled(x4));

  always #5 clk = ~clk;
  always @(posedge clk) if (fvalid) nvalid++;

  `include "kalman_ref.svh"
  kstate_t ref_az, ref_el;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic pair(input int za, input int ze, input bit en);
    int lat, ea, ee, n0, exp_lat;
    bit was_init;
    was_init = ref_az.init;
    n0 = nvalid;
    @(negedge clk);
    az_raw = q97_t'(za); el_raw = q97_t'(ze); enable = en; valid = 1;
    lat = 0;
    do begin @(posedge clk); lat++; end while (!fvalid && lat < 200);
    lat--;   // count from the edge that first sampled valid
    @(negedge clk) valid = 0;
    repeat (40) @(posedge clk);
    ea = step(ref_az, za, int'(q_param), int'(r_param), en);
    ee = step(ref_el, ze, int'(q_param), int'(r_param), en);
    exp_lat = !en ? 7 : !was_init ? 8 : 30;
    check(lat == exp_lat, $sformatf("latency %0d expected %0d", lat, exp_lat));
    check(nvalid == n0 + 1, $sformatf("%0d results for one valid", nvalid - n0));
    check(int'(az_f) == ea && int'(el_f) == ee, $sformatf("az %0d/%0d el %0d/%0d", az_f, ea, el_f, ee));
    check(conv == (ref_az.conv && ref_el.conv), "filter_converged");
    check(!ferr, "filter_error on in-range data");
    check(tmo2 == was_init && !tmo, $sformatf("timeout flags tmo2=%0b tmo=%0b en=%0b init=%0b", tmo2, tmo, en, was_init));
    if (tmo2) n_tmo++;
    if (conv) n_conv++;
    if (!en) n_bypass++;
    if (azh || elh) n_hard++;
  endtask

  initial begin
    reset_state(ref_az); reset_state(ref_el);
    az_raw = 0; el_raw = 0; q_param = 16'sd4; r_param = 16'sd256;
    repeat (3) @(posedge clk);
    reset_n = 1;
    for (int i = 0; i < 400; i++) begin
      int ta, te, za, ze;
      ta = 11520 + i * 4;                 // azimuth drifts upward from 90 degrees
      te = 5760;                          // elevation steady at 45 degrees
      za = ta + int'($urandom_range(0, 256)) - 128;
      ze = te + int'($urandom_range(0, 384)) - 192;
      if (i == 150) za = za + 4480;       // 35-degree spike on azimuth only
      if (i == 250) ze = ze - 3200;
      pair(za, ze, !(i >= 300 && i < 310));
    end
    $display("mechanisms: timeout=%0d converged=%0d bypass=%0d hard=%0d", n_tmo, n_conv, n_bypass, n_hard);
    check(n_tmo > 0 && n_conv > 0 && n_bypass > 0 && n_hard > 0, "a mechanism never occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
