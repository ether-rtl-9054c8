// kalman_filter_top: the two-axis Kalman filter subsystem.
//
// Two independent kalman_scalar instances filter azimuth and elevation in
// parallel, sharing the enable, Q and R inputs. Around them:
//  * a two-stage synchroniser and edge detector turns `angle_data_valid`
//    (which may be held high) into a single start pulse;
//  * an input buffer latches both raw angles on that pulse and starts the
//    filters; a pulse arriving while a pair is being filtered is dropped;
//  * an output stage latches each filter's `done`, and once both are in
//    registers the two estimates and pulses `filtered_valid` for one cycle;
//    the filtered outputs hold their values until the next pair;
//  * a timeout timer runs while a pair is in flight; if it reaches
//    TIMEOUT_CYCLES the pair is abandoned and `timeout_error` is set (it is
//    cleared by the next accepted pair).
// `filter_converged` is high when both axes report convergence, and
// `filter_error` when either filter flagged its last sample (divider error
// or saturated innovation).
//
// Timing: with the raw angles stable, `filtered_valid` is sampled high 30
// clock edges after the edge that first samples `angle_data_valid` high
// (3 to synchronise, 1 to latch, 25 in the filters, 1 to register the
// outputs); 8 edges for the first pair after reset, 7 in bypass.
//
// The block structure and signal names follow the subsystem diagram; the
// drop-while-busy rule, the timeout value and the combination of the two
// convergence flags are this design's choices.
module kalman_filter_top
  import ether_pkg::*;
#(
  parameter int unsigned TIMEOUT_CYCLES = 1024
) (
  input  logic sys_clk,
  input  logic reset_n,
  input  logic enable,
  input  logic angle_data_valid,
  input  q97_t azimuth_raw,
  input  q97_t elevation_raw,
  input  q97_t q_param,
  input  q97_t r_param,
  output logic filtered_valid,
  output q97_t azimuth_filtered,
  output q97_t elevation_filtered,
  output logic filter_converged,
  output logic timeout_error,
  output logic filter_error,
  // per-axis observation (adaptive-R activity of the last sample)
  output logic az_hard_reject,
  output logic el_hard_reject,
  output logic az_soft_scaled,
  output logic el_soft_scaled
);
  logic valid_sync, valid_rise;
  sync_edge_detect u_sync (.clk(sys_clk), .reset_n, .async_in(angle_data_valid),
                           .level(valid_sync), .rise(valid_rise));

  // input validation and start buffer
  logic busy, start_filter;
  q97_t azimuth_raw_buf, elevation_raw_buf;
  logic az_done, el_done, az_done_l, el_done_l;
  q97_t az_estimate, el_estimate;
  logic timed_out;
  logic [$clog2(TIMEOUT_CYCLES+1)-1:0] timeout_counter;

  always_ff @(posedge sys_clk or negedge reset_n) begin
    if (!reset_n) begin
      azimuth_raw_buf   <= '0;
      elevation_raw_buf <= '0;
      start_filter      <= 1'b0;
      busy              <= 1'b0;
    end else begin
      start_filter <= 1'b0;
      if (valid_rise && !busy) begin
        azimuth_raw_buf   <= azimuth_raw;
        elevation_raw_buf <= elevation_raw;
        start_filter      <= 1'b1;
        busy              <= 1'b1;
      end else if (busy && ((az_done_l || az_done) && (el_done_l || el_done) || timed_out)) begin
        busy <= 1'b0;
      end
    end
  end

  logic az_conv, el_conv, az_err, el_err;
  logic [15:0] az_cnt, el_cnt;
  q97_t az_p, az_k, az_ia, az_r, el_p, el_k, el_ia, el_r;

  kalman_scalar u_kalman_azimuth (
    .clk(sys_clk), .reset_n, .start(start_filter), .enable,
    .measurement(azimuth_raw_buf), .q_param, .r_param,
    .estimate(az_estimate), .done(az_done), .converged(az_conv), .error(az_err),
    .sample_count(az_cnt), .p_est(az_p), .k_gain(az_k), .innov_avg(az_ia), .r_eff(az_r),
    .hard_reject(az_hard_reject), .soft_scaled(az_soft_scaled)
  );
  kalman_scalar u_kalman_elevation (
    .clk(sys_clk), .reset_n, .start(start_filter), .enable,
    .measurement(elevation_raw_buf), .q_param, .r_param,
    .estimate(el_estimate), .done(el_done), .converged(el_conv), .error(el_err),
    .sample_count(el_cnt), .p_est(el_p), .k_gain(el_k), .innov_avg(el_ia), .r_eff(el_r),
    .hard_reject(el_hard_reject), .soft_scaled(el_soft_scaled)
  );

  // output sync and valid generation
  q97_t az_latched, el_latched;
  always_ff @(posedge sys_clk or negedge reset_n) begin
    if (!reset_n) begin
      az_done_l          <= 1'b0;
      el_done_l          <= 1'b0;
      az_latched         <= '0;
      el_latched         <= '0;
      filtered_valid     <= 1'b0;
      azimuth_filtered   <= '0;
      elevation_filtered <= '0;
    end else begin
      filtered_valid <= 1'b0;
      if (start_filter || timed_out || !busy) begin
        // results that arrive after a timeout are discarded
        az_done_l <= 1'b0;
        el_done_l <= 1'b0;
      end else begin
        if (az_done) begin az_done_l <= 1'b1; az_latched <= az_estimate; end
        if (el_done) begin el_done_l <= 1'b1; el_latched <= el_estimate; end
        if ((az_done_l || az_done) && (el_done_l || el_done) && busy) begin
          filtered_valid     <= 1'b1;
          azimuth_filtered   <= az_done ? az_estimate : az_latched;
          elevation_filtered <= el_done ? el_estimate : el_latched;
          az_done_l          <= 1'b0;
          el_done_l          <= 1'b0;
        end
      end
    end
  end

  // timeout detection timer
  assign timed_out = busy && (timeout_counter == ($bits(timeout_counter))'(TIMEOUT_CYCLES));
  always_ff @(posedge sys_clk or negedge reset_n) begin
    if (!reset_n) begin
      timeout_counter <= '0;
      timeout_error   <= 1'b0;
    end else begin
      if (start_filter) begin
        timeout_counter <= '0;
        timeout_error   <= 1'b0;
      end else if (timed_out) begin
        timeout_error   <= 1'b1;
        timeout_counter <= '0;
      end else if (busy) begin
        timeout_counter <= timeout_counter + 1'b1;
      end
    end
  end

  assign filter_converged = az_conv & el_conv;
  assign filter_error     = az_err | el_err;

  // The two filters run in lock step, so their done pulses coincide.
  assert property (@(posedge sys_clk) disable iff (!reset_n) az_done == el_done);
endmodule
