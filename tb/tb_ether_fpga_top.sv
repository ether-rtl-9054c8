// tb_ether_fpga_top: end-to-end test of the filtering fabric at its default
// parameters (50 MHz clock, 115200 baud, 10 ms filter timeout), acting as
// the tracker's microcontroller on the serial line and as the processor on
// the PIO port.
//
// The test sends four-byte packets of raw angles at 115200 baud 8N1 and
// receives the four-byte answers with its own serial receiver (sampling
// in the middle of each bit). Each answer is compared with two copies of
// an integer model of the adaptive Kalman filter (kalman_ref.svh), one per
// axis, stepped with the same raw angles, Q, R and enable. The angle
// sequence follows a slow sun-like sweep with noise, plus spikes and
// sudden steps, so that the filter goes through convergence, soft
// R-scaling and hard rejection. After every answer the processor side
// reads the four PIOs and compares them with the last raw and filtered
// pair, and reads one unmapped address.
//
// Phases: (1) filtered tracking; (2) bypass with angles outside 0..180
// degrees, which come back clamped; (3) one packet with the filter's valid
// pulse held low, answered with the raw angles after the 10 ms timeout;
// (4) half a packet followed by a pause longer than the bus timeout, which
// the fabric drops before reading the next packet correctly; (5) filtered
// tracking again. Each mechanism is counted and a failure is counted for
// one that never happened. About 4.3 M clock cycles (86 ms simulated).
module tb_ether_fpga_top;
  import ether_pkg::*;
  `include "kalman_ref.svh"

  localparam int BIT_CYC = 434;   // 50 MHz / 115200
  logic clk = 0, reset_n = 0;
  logic uart_rxd = 1, uart_txd;
  logic filter_enable = 1;
  q97_t q_param = 16'sd2, r_param = 16'sd128;
  logic [31:0] hps_address = 0, hps_readdata;
  logic hps_read = 0, hps_waitrequest;
  logic filter_converged, kf_timeout_error, kf_filter_error, uart_irq;
  logic [15:0] packets_sent, kalman_fallbacks;
  int checks = 0, failures = 0;

  ether_fpga_top dut (.*);
  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // ---------------- serial side ----------------
  task automatic send_byte(input logic [7:0] b);
    uart_rxd = 0; repeat (BIT_CYC) @(posedge clk);
    for (int i = 0; i < 8; i++) begin uart_rxd = b[i]; repeat (BIT_CYC) @(posedge clk); end
    uart_rxd = 1; repeat (BIT_CYC) @(posedge clk);
  endtask

  byte unsigned rxq[$];
  int n_frame_err = 0;
  initial begin
    logic [7:0] b;
    forever begin
      @(negedge uart_txd);
      repeat (BIT_CYC / 2) @(posedge clk);
      if (uart_txd) continue;   // glitch
      for (int i = 0; i < 8; i++) begin repeat (BIT_CYC) @(posedge clk); b[i] = uart_txd; end
      repeat (BIT_CYC) @(posedge clk);
      if (!uart_txd) n_frame_err++;
      rxq.push_back(b);
    end
  end

  task automatic get_answer(output logic [15:0] az, output logic [15:0] el, output bit ok, input int max_cyc);
    int t = 0;
    while (rxq.size() < 4 && t < max_cyc) begin @(posedge clk); t++; end
    ok = (rxq.size() >= 4);
    if (ok) begin
      az = {rxq[0], rxq[1]}; el = {rxq[2], rxq[3]};
      repeat (4) void'(rxq.pop_front());
    end else begin az = 0; el = 0; end
  endtask

  // ---------------- processor side ----------------
  task automatic hps_rd(input logic [31:0] a, output logic [31:0] d, output bit miss);
    @(negedge clk);
    hps_address = a; hps_read = 1;
    #1 d = hps_readdata; miss = dut.decode_miss;
    @(negedge clk);
    hps_read = 0;
  endtask

  // ---------------- model and counters ----------------
  kstate_t ref_az, ref_el;
  int n_filtered = 0, n_bypass = 0, n_clamped = 0, n_hard = 0, n_soft = 0, n_conv = 0;
  int n_fallback = 0, n_resync = 0, n_pio = 0, n_miss = 0, n_irq = 0;
  logic [15:0] last_raw_az, last_raw_el, last_f_az, last_f_el;

  always @(posedge clk) if (uart_irq) n_irq++;

  task automatic packet(input int za, input int ze, input bit force_silent);
    int ea, ee;
    logic [15:0] ga, ge;
    bit ok;
    logic [31:0] d;
    bit miss;
    ea = step(ref_az, za, int'(q_param), int'(r_param), filter_enable);
    ee = step(ref_el, ze, int'(q_param), int'(r_param), filter_enable);
    if (force_silent) force dut.filt_valid = 1'b0;
    send_byte(8'(za >> 8)); send_byte(8'(za)); send_byte(8'(ze >> 8)); send_byte(8'(ze));
    get_answer(ga, ge, ok, force_silent ? 700_000 : 60_000);
    if (force_silent) begin
      release dut.filt_valid;
      check(ok && ga == 16'(za) && ge == 16'(ze), $sformatf("fallback answer %h %h for %h %h", ga, ge, za, ze));
      if (ok && ga == 16'(za)) n_fallback++;
    end else begin
      check(ok, "answer received");
      check(ga == 16'(ea) && ge == 16'(ee),
            $sformatf("packet %0d: got %0d %0d expected %0d %0d (raw %0d %0d, en %0b)",
                      packets_sent, $signed(ga), $signed(ge), ea, ee, za, ze, filter_enable));
      if (filter_enable) n_filtered++; else n_bypass++;
      if (!filter_enable && (ea != za || ee != ze)) n_clamped++;
    end
    if (ref_az.is_hard || ref_el.is_hard) n_hard++;
    if (ref_az.is_soft || ref_el.is_soft) n_soft++;
    if (filter_enable && filter_converged) n_conv++;
    if (filter_enable) check(filter_converged == (ref_az.conv && ref_el.conv), "converged flag");
    check(!kf_filter_error && !kf_timeout_error, "filter error flags");
    last_raw_az = 16'(za); last_raw_el = 16'(ze);
    last_f_az = 16'(ea);   last_f_el = 16'(ee);
    // processor reads of the four PIOs and one unmapped address
    hps_rd(PIO_AZ_RAW_BASE, d, miss);      check(d == 32'(last_raw_az) && !miss, "PIO az raw");
    hps_rd(PIO_EL_RAW_BASE, d, miss);      check(d == 32'(last_raw_el) && !miss, "PIO el raw");
    hps_rd(PIO_AZ_FILTERED_BASE, d, miss); check(d == 32'(last_f_az) && !miss, $sformatf("PIO az filtered %h", d));
    hps_rd(PIO_EL_FILTERED_BASE, d, miss); check(d == 32'(last_f_el) && !miss, "PIO el filtered");
    n_pio += 4;
    hps_rd(32'h1000_0040, d, miss);        check(d == 0 && miss && !hps_waitrequest, "unmapped read");
    if (miss) n_miss++;
  endtask

  function automatic int noise(int amp);
    return int'($urandom_range(0, 2 * amp)) - amp;
  endfunction

  initial begin
    int az, el;
    logic [15:0] ga, ge, sent0, to0;
    bit ok;
    reset_state(ref_az); reset_state(ref_el);
    repeat (5) @(posedge clk);
    reset_n = 1;
    repeat (100) @(posedge clk);
    // (1) filtered tracking: slow sweep with noise, spikes, one sudden step
    for (int k = 0; k < 60; k++) begin
      az = 30 * 128 + k * 64 + noise(96);
      el = 45 * 128 + k * 16 + noise(96);
      if (k == 25 || k == 40) az += 20 * 128;      // spike
      if (k >= 50) el += 10 * 128;                 // sudden change
      packet(az, el, 0);
    end
    // (2) bypass, with out-of-range angles
    filter_enable = 0;
    for (int k = 0; k < 8; k++) begin
      az = (k % 2) ? 190 * 128 + noise(200) : 60 * 128 + noise(200);
      el = (k % 2) ? -(5 * 128) + noise(100) : 50 * 128 + noise(200);
      packet(az, el, 0);
    end
    filter_enable = 1;
    // (3) filter valid pulse suppressed: raw fallback after the timeout
    packet(70 * 128, 60 * 128, 1);
    check(kalman_fallbacks == 1, "fallback counter");
    // (4) half a packet, then a pause longer than the bus timeout
    to0 = dut.bus_timeouts;
    send_byte(8'h12); send_byte(8'h34);
    repeat (600_000) @(posedge clk);
    check(dut.bus_timeouts != to0, "partial packet dropped by the bus timeout");
    check(rxq.size() == 0, "no answer to a partial packet");
    sent0 = packets_sent;
    packet(70 * 128, 60 * 128, 0);
    if (dut.bus_timeouts != to0 && packets_sent == sent0 + 1) n_resync++;
    // (5) filtered tracking again
    for (int k = 0; k < 20; k++) packet(72 * 128 + k * 32 + noise(64), 61 * 128 + noise(64), 0);
    check(n_frame_err == 0, "stop bits");
    check(packets_sent == 16'(60 + 8 + 1 + 1 + 20), $sformatf("packets_sent %0d", packets_sent));
    $display("mechanisms: filtered=%0d bypass=%0d clamped=%0d hard=%0d soft=%0d converged=%0d fallback=%0d resync=%0d pio=%0d miss=%0d irq_cycles=%0d",
             n_filtered, n_bypass, n_clamped, n_hard, n_soft, n_conv, n_fallback, n_resync, n_pio, n_miss, n_irq);
    check(n_filtered > 0, "filtering never happened");
    check(n_bypass > 0,   "bypass never happened");
    check(n_clamped > 0,  "clamping never happened");
    check(n_hard > 0,     "hard rejection never happened");
    check(n_soft > 0,     "soft scaling never happened");
    check(n_conv > 0,     "convergence never happened");
    check(n_fallback > 0, "raw fallback never happened");
    check(n_resync > 0,   "bus timeout never happened");
    check(n_pio > 0 && n_miss > 0, "PIO reads never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
