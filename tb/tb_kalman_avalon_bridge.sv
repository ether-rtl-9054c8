// tb_kalman_avalon_bridge: the bridge against a behavioural model of the
// UART registers on the external bus (random acknowledge delay, byte queues
// for both directions, TRDY that can be forced low) and a model of the
// filter that answers with a known transform of the raw angles.
// Checks: the first status poll comes after the 256-cycle idle delay;
// packets are assembled as [AZ_H][AZ_L][EL_H][EL_L] and presented to the
// filter; the filtered answer goes out in the same byte order; with the
// filter silent the raw angles go back after KALMAN_TIMEOUT cycles and
// `fallback_count` counts it; a partial packet followed by a long gap is
// dropped (`bus_timeouts`) and the next packet is still read correctly; a
// slave that never acknowledges is abandoned; transmission waits while TRDY
// is low. Every mechanism is counted and must occur.
module tb_kalman_avalon_bridge;
  import ether_pkg::*;
  localparam int KT = 2000, BT = 3000;
  logic clk = 0, reset_n = 0;
  int checks = 0, failures = 0;
  ext_bus_if bus (.clk, .reset_n);
  q97_t az_raw, el_raw, az_filt, el_filt, az_tx, el_tx;
  logic adv, fvalid;
  logic [15:0] tx_count, fallback_count, bus_timeouts;

  kalman_avalon_bridge #(.POLL_DELAY(255), .KALMAN_TIMEOUT(KT), .BUS_TIMEOUT(BT), .ACK_TIMEOUT(255)) dut (
    .clk, .reset_n, .bus(bus.master), .azimuth_raw(az_raw), .elevation_raw(el_raw),
    .angle_data_valid(adv), .filtered_valid(fvalid), .azimuth_filtered(az_filt),
    .elevation_filtered(el_filt), .azimuth_tx(az_tx), .elevation_tx(el_tx),
    .tx_count, .fallback_count, .bus_timeouts);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // ---------------- UART register model ----------------
  byte unsigned rxq[$], txq[$];
  bit trdy_block = 0, ack_block = 0;
  int first_poll = -1, cycle = 0;
  int delay;
  always @(posedge clk) cycle++;
  initial begin
    bus.acknowledge = 0; bus.readdata = 0;
    forever begin
      @(posedge clk);
      #1 bus.acknowledge = 0;
      if ((bus.read || bus.write) && !ack_block) begin
        if (first_poll < 0) first_poll = cycle;
        delay = $urandom_range(0, 3);
        repeat (delay) @(posedge clk);
        #1;
        if (!(bus.read || bus.write)) continue;
        if (bus.read && bus.address == UART_STATUS)
          bus.readdata = 16'(((rxq.size() != 0) << ST_RRDY) | ((!trdy_block) << ST_TRDY));
        else if (bus.read && bus.address == UART_RXDATA)
          bus.readdata = (rxq.size() != 0) ? 16'(rxq.pop_front()) : 16'd0;
        else if (bus.write && bus.address == UART_TXDATA)
          txq.push_back(bus.writedata[7:0]);
        bus.acknowledge = 1;
        @(posedge clk);
        #1 bus.acknowledge = 0;
      end
    end
  end

  // ---------------- filter model ----------------
  bit filter_silent = 0;
  int n_trig = 0;
  initial begin
    fvalid = 0; az_filt = 0; el_filt = 0;
    forever begin
      @(posedge clk);
      if (adv) begin
        n_trig++;
        repeat (30) @(posedge clk);
        if (!filter_silent) begin
          #1 az_filt = az_raw + 16'sd3; el_filt = el_raw - 16'sd5; fvalid = 1;
          @(posedge clk); #1 fvalid = 0;
        end
        while (adv) @(posedge clk);
      end
    end
  end

  task automatic send_bytes(input int n, input logic [31:0] pkt, input int gap);
    for (int i = 0; i < n; i++) begin
      rxq.push_back(pkt[31 - 8*i -: 8]);
      repeat (gap) @(posedge clk);
    end
  endtask

  task automatic expect_answer(input logic [15:0] az, input logic [15:0] el, input string what);
    int t;
    t = 0;
    while (txq.size() < 4 && t < 20000) begin @(posedge clk); t++; end
    check(txq.size() == 4, {what, ": four bytes sent"});
    if (txq.size() >= 4)
      check({txq[0], txq[1], txq[2], txq[3]} == {az, el},
            $sformatf("%s: sent %h%h%h%h expected %h%h", what, txq[0], txq[1], txq[2], txq[3], az, el));
    txq.delete();
  endtask

  initial begin
    int t0, n_resync = 0, n_fallback = 0, n_ackto = 0, n_trdy = 0;
    repeat (3) @(posedge clk);
    reset_n = 1;
    t0 = cycle;
    // 1: normal packets with gaps between bytes
    for (int k = 0; k < 5; k++) begin
      logic [15:0] az, el;
      az = 16'($urandom_range(0, 23040)); el = 16'($urandom_range(0, 23040));
      send_bytes(4, {az, el}, 300);
      expect_answer(az + 16'd3, el - 16'd5, "filtered packet");
      check(az_raw == az && el_raw == el, "raw angles presented to the filter");
    end
    check(first_poll - t0 >= 256, $sformatf("first poll after %0d cycles", first_poll - t0));
    check(tx_count == 5 && n_trig == 5, $sformatf("tx_count %0d, %0d triggers", tx_count, n_trig));
    // 2: silent filter -> raw fallback after the timeout
    filter_silent = 1;
    begin
      int ts;
      send_bytes(4, 32'h1234_0567, 10);
      ts = cycle;
      expect_answer(16'h1234, 16'h0567, "fallback packet");
      check(cycle - ts >= KT, $sformatf("fallback after %0d cycles", cycle - ts));
      check(fallback_count == 1, "fallback counted");
      if (fallback_count == 1) n_fallback++;
    end
    filter_silent = 0;
    // 3: partial packet, long gap, then a good packet
    begin
      logic [15:0] to;
      to = bus_timeouts;
      send_bytes(2, 32'hAAAA_0000, 10);
      repeat (2 * BT) @(posedge clk);
      check(bus_timeouts > to, "gap after a partial packet timed out");
      send_bytes(4, 32'h0100_0200, 50);
      expect_answer(16'h0103, 16'h01FB, "packet after resync");
      if (bus_timeouts > to) n_resync++;
    end
    // 4: slave stops acknowledging
    begin
      logic [15:0] to;
      to = bus_timeouts;
      ack_block = 1;
      repeat (2000) @(posedge clk);
      ack_block = 0;
      check(bus_timeouts > to, "unacknowledged access abandoned");
      if (bus_timeouts > to) n_ackto++;
      send_bytes(4, 32'h0300_0400, 20);
      expect_answer(16'h0303, 16'h03FB, "packet after abandoned access");
    end
    // 5: TRDY low delays transmission
    begin
      int n0;
      trdy_block = 1;
      send_bytes(4, 32'h0500_0600, 20);
      repeat (1000) @(posedge clk);
      check(txq.size() == 0, "nothing sent while TRDY low");
      n0 = txq.size();
      trdy_block = 0;
      expect_answer(16'h0503, 16'h05FB, "packet after TRDY wait");
      if (n0 == 0) n_trdy++;
    end
    $display("mechanisms: fallback=%0d resync=%0d ack_timeout=%0d trdy_wait=%0d", n_fallback, n_resync, n_ackto, n_trdy);
    check(n_fallback > 0 && n_resync > 0 && n_ackto > 0 && n_trdy > 0, "a mechanism never occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (300000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
