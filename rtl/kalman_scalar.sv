// kalman_scalar: adaptive scalar Kalman filter for one tracking axis.
//
// The state is a single angle with a quasi-static model, so one iteration is
//   predict : x_pred = x_est,  P_pred = P_est + Q,  innov = z - x_est
//   adapt R : excess = max(0, |innov| - innov_avg)
//             R_eff  = R * 640                        if excess > 3.75 deg
//                    = R * (1 + (excess*35/256)^2)    otherwise
//   gain    : K = P_pred / (P_pred + R_eff)           (restoring divider)
//   update  : x_est = clamp(x_pred + K*innov, 0..180 deg)
//             P_est = max(P_MIN, P_pred - K*P_pred)
// innov_avg is an exponential average (alpha = 1/64) of |innov|, updated
// only when |innov| < 1.5 * innov_avg so that outliers are not learned.
// All values are Q9.7 with saturating arithmetic. The first sample after
// reset initialises x_est to the measurement and P_est to P_INIT (2.0).
// With `enable` low the measurement is passed through, clamped, and the
// filter state is left untouched.
//
// Control is a state machine: IDLE, then PREDICT, CALC_R, START_DIV,
// WAIT_DIV, UPDATE, UPDATE_P, OUTPUT; INIT for the first sample; BYPASS when
// disabled. Interface: pulse `start` with `measurement` valid (sampled in
// IDLE); `done` pulses for one cycle with `estimate` valid. Latency: `done`
// is sampled high 25 clock edges after the edge that sampled `start`
// (18 of them in the divider); 3 edges for the first sample, 2 in bypass.
// `start` is ignored while a sample is being processed.
//
// The equations, the constants 640, 3.75 deg, 35/256, 1/64 and 1.5x, and
// the state sequence including INIT (x from the first measurement, P set to
// an initial value, sample count 1) follow the filter description. The
// initial P of 2.0, P_MIN, the initial and minimum innov_avg and the
// convergence rule (CONV_SAMPLES samples and P_est <= CONV_P) are this
// design's choices, as are the `error` flag (divider error or saturated
// innovation) and the status outputs.
//
// Bits 15:8 of `k_gain` are always 0 after synthesis because the gain never
// exceeds 1.0; the port keeps the Q9.7 width of the other values.
module kalman_scalar
  import ether_pkg::*;
#(
  parameter q97_t        P_INIT         = 16'sd256,  // 2.0
  parameter q97_t        P_MIN          = 16'sd1,    // covariance floor
  parameter q97_t        INNOV_AVG_INIT = 16'sd128,  // 1.0 deg
  parameter q97_t        INNOV_AVG_MIN  = 16'sd16,   // 0.125 deg
  parameter q97_t        HARD_THRESH    = 16'sd480,  // 3.75 deg
  parameter int unsigned HARD_SCALE     = 640,
  parameter int unsigned SOFT_NUM       = 35,
  parameter int unsigned SOFT_SHIFT     = 8,
  parameter int unsigned EMA_SHIFT      = 6,        // alpha = 1/64
  parameter q97_t        CONV_P         = 16'sd64,  // 0.5
  parameter int unsigned CONV_SAMPLES   = 10
) (
  input  logic        clk,
  input  logic        reset_n,
  input  logic        start,
  input  logic        enable,
  input  q97_t        measurement,
  input  q97_t        q_param,
  input  q97_t        r_param,
  output q97_t        estimate,
  output logic        done,
  output logic        converged,
  output logic        error,
  output logic [15:0] sample_count,
  // observation of the internal state
  output q97_t        p_est,
  output q97_t        k_gain,
  output q97_t        innov_avg,
  output q97_t        r_eff,
  output logic        hard_reject,   // last filtered sample was hard-rejected
  output logic        soft_scaled    // last filtered sample had R raised softly
);
  typedef enum logic [3:0] {
    S_IDLE, S_BYPASS, S_INIT, S_PREDICT, S_CALC_R, S_START_DIV,
    S_WAIT_DIV, S_UPDATE, S_UPDATE_P, S_OUTPUT
  } kstate_t;
  kstate_t state;

  q97_t meas_reg, x_est, x_pred, p_pred, innov, denom;
  logic initialized;
  logic innov_ovf_r;

  // ---------------- combinational datapath ----------------
  q97_t p_pred_c, innov_c;
  logic p_pred_ovf, innov_ovf;
  fp_add_sat u_ppred (.a(p_est),    .b(q_param), .y(p_pred_c), .ovf(p_pred_ovf));
  fp_sub_sat u_innov (.a(meas_reg), .b(x_est),   .y(innov_c),  .ovf(innov_ovf));

  // adaptive R
  q97_t abs_innov, excess, scaled, scale, one_plus, r_soft, r_hard, r_eff_c, denom_c;
  logic hard_c, soft_c;
  logic m1_ovf, a1_ovf, m2_ovf, a2_ovf;
  logic [31:0] scaled_w;
  logic signed [33:0] r_hard_w;

  always_comb begin
    abs_innov = (innov == Q97_MIN) ? Q97_MAX : ((innov < 0) ? -innov : innov);
    excess    = (abs_innov > innov_avg) ? (abs_innov - innov_avg) : '0;
    scaled_w  = (32'(excess) * SOFT_NUM) >> SOFT_SHIFT;
    scaled    = q97_t'(scaled_w[15:0]);
    r_hard_w  = 34'(r_param) * 34'(HARD_SCALE);
    r_hard    = sat16(r_hard_w);
    hard_c    = (excess > HARD_THRESH);
    soft_c    = (excess > 0) && !hard_c;
  end

  fp_multiply u_sq   (.a(scaled),  .b(scaled),   .y(scale),    .ovf(m1_ovf));
  fp_add_sat  u_one  (.a(Q97_ONE), .b(scale),    .y(one_plus), .ovf(a1_ovf));
  fp_multiply u_rsft (.a(r_param), .b(one_plus), .y(r_soft),   .ovf(m2_ovf));
  assign r_eff_c = hard_c ? r_hard : r_soft;
  fp_add_sat  u_den  (.a(p_pred),  .b(r_eff_c),  .y(denom_c),  .ovf(a2_ovf));

  // running innovation average
  q97_t avg_next;
  logic signed [16:0] avg_diff;
  logic signed [17:0] abs_x2, avg_x3;
  always_comb begin
    abs_x2   = 18'(abs_innov) <<< 1;
    avg_x3   = 18'(innov_avg) * 18'sd3;
    avg_diff = 17'(abs_innov) - 17'(innov_avg);
    avg_next = innov_avg;
    if (abs_x2 < avg_x3) begin
      avg_next = q97_t'(17'(innov_avg) + (avg_diff >>> EMA_SHIFT));
      if (avg_next < INNOV_AVG_MIN) avg_next = INNOV_AVG_MIN;
    end
  end

  // gain and update
  logic div_start, div_done, div_busy, div_err;
  q97_t div_q;
  fp_divide_fast u_div (
    .clk, .reset_n, .start(div_start), .num(p_pred), .den(denom),
    .quotient(div_q), .done(div_done), .busy(div_busy), .err(div_err)
  );
  assign div_start = (state == S_START_DIV);

  q97_t k_innov, x_new, k_p, p_new;
  logic m3_ovf, a3_ovf, m4_ovf, s4_ovf;
  fp_multiply u_kinn (.a(k_gain), .b(innov),   .y(k_innov), .ovf(m3_ovf));
  fp_add_sat  u_xnew (.a(x_pred), .b(k_innov), .y(x_new),   .ovf(a3_ovf));
  fp_multiply u_kp   (.a(k_gain), .b(p_pred),  .y(k_p),     .ovf(m4_ovf));
  fp_sub_sat  u_pnew (.a(p_pred), .b(k_p),     .y(p_new),   .ovf(s4_ovf));

  // ---------------- control ----------------
  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      state        <= S_IDLE;
      meas_reg     <= '0;
      x_est        <= '0;
      x_pred       <= '0;
      p_est        <= P_INIT;
      p_pred       <= '0;
      innov        <= '0;
      innov_avg    <= INNOV_AVG_INIT;
      r_eff        <= '0;
      denom        <= '0;
      k_gain       <= '0;
      initialized  <= 1'b0;
      sample_count <= '0;
      converged    <= 1'b0;
      estimate     <= '0;
      done         <= 1'b0;
      error        <= 1'b0;
      innov_ovf_r  <= 1'b0;
      hard_reject  <= 1'b0;
      soft_scaled  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          meas_reg <= measurement;
          if (!enable)           state <= S_BYPASS;
          else if (!initialized) state <= S_INIT;
          else                   state <= S_PREDICT;
        end
        S_BYPASS: begin
          estimate <= clamp_angle(meas_reg);
          done     <= 1'b1;
          state    <= S_IDLE;
        end
        S_INIT: begin
          x_est        <= meas_reg;
          p_est        <= P_INIT;
          initialized  <= 1'b1;
          sample_count <= 16'd1;
          hard_reject  <= 1'b0;
          soft_scaled  <= 1'b0;
          innov_ovf_r  <= 1'b0;
          state        <= S_OUTPUT;
        end
        S_PREDICT: begin
          x_pred      <= x_est;
          p_pred      <= p_pred_c;
          innov       <= innov_c;
          innov_ovf_r <= innov_ovf;
          state       <= S_CALC_R;
        end
        S_CALC_R: begin
          r_eff       <= r_eff_c;
          denom       <= denom_c;
          innov_avg   <= avg_next;
          hard_reject <= hard_c;
          soft_scaled <= soft_c;
          state       <= S_START_DIV;
        end
        S_START_DIV: state <= S_WAIT_DIV;
        S_WAIT_DIV: if (div_done) begin
          k_gain <= div_q;
          state  <= S_UPDATE;
        end
        S_UPDATE: begin
          x_est <= clamp_angle(x_new);
          state <= S_UPDATE_P;
        end
        S_UPDATE_P: begin
          p_est <= (p_new < P_MIN) ? P_MIN : p_new;
          if (sample_count != 16'hFFFF) sample_count <= sample_count + 16'd1;
          converged <= ({16'd0, sample_count} + 32'd1 >= 32'(CONV_SAMPLES)) && (p_new <= CONV_P);
          state <= S_OUTPUT;
        end
        S_OUTPUT: begin
          estimate <= clamp_angle(x_est);
          error    <= div_err || innov_ovf_r;
          done     <= 1'b1;
          state    <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // a new start must not arrive while the divider is still running
  assert property (@(posedge clk) disable iff (!reset_n) (state == S_START_DIV) |-> !div_busy);
endmodule
