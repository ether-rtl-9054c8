// ether_fpga_top: FPGA fabric of the solar tracker's filtering co-processor.
//
// The tracker's microcontroller sends, over a 115200-baud 8N1 serial link,
// four-byte packets [AZ_H][AZ_L][EL_H][EL_L] holding raw azimuth and
// elevation angles in Q9.7. This fabric answers each packet with a packet
// of the same format holding the Kalman-filtered angles:
//
//   uart_rxd -> uart_avalon -> (Avalon-MM) -> ext_bus_avalon_bridge
//            -> (external bus) -> kalman_avalon_bridge -> kalman_filter_top
//   and back the same way to uart_txd.
//
// The bridge also keeps the last raw pair, and the filter the last filtered
// pair; four input PIOs expose them to the hard processor through
// avalon_interconnect at 0x1000_0000 (azimuth raw), 0x1000_0010 (elevation
// raw), 0x1000_0020 (azimuth filtered) and 0x1000_0030 (elevation
// filtered). The processor itself, the PLL and the clock/reset generation
// are outside this module: `clk` is the 50 MHz system clock and the
// processor's master port is brought out as plain signals.
// `filter_enable`, `q_param` and `r_param` configure both filters
// (disabled = raw values pass through, clamped to 0..180 degrees).
//
// Timing: one packet takes about 20000 cycles to arrive at 115200 baud;
// the fabric needs a few hundred cycles (status polls, 4 byte reads, about
// 30 cycles of filtering, 4 byte writes) before the answer starts to leave.
//
// The set of components and how they connect follow the system description;
// the plain-signal processor port, the top-level Q/R/enable inputs and the
// BUS_TIMEOUT/KF_TIMEOUT values are this design's choices. The bridge's
// transmitted values, bus-timeout count and the filters' hard/soft status
// flags are left unconnected here (they are for debugging), and
// hps_waitrequest is constant 0 because the PIO slaves never stall.
module ether_fpga_top
  import ether_pkg::*;
#(
  parameter int unsigned CLK_HZ          = 50_000_000,
  parameter int unsigned BAUD            = 115_200,
  parameter int unsigned UART_FIFO_DEPTH = 8,
  parameter int unsigned POLL_DELAY      = 255,
  parameter int unsigned KALMAN_TIMEOUT  = 500_000,
  parameter int unsigned BUS_TIMEOUT     = 500_000,
  parameter int unsigned KF_TIMEOUT      = 1024
) (
  input  logic        clk,
  input  logic        reset_n,
  input  logic        uart_rxd,
  output logic        uart_txd,
  input  logic        filter_enable,
  input  q97_t        q_param,
  input  q97_t        r_param,
  input  logic [31:0] hps_address,
  input  logic        hps_read,
  output logic [31:0] hps_readdata,
  output logic        hps_waitrequest,
  output logic        filter_converged,
  output logic        kf_timeout_error,
  output logic        kf_filter_error,
  output logic [15:0] packets_sent,
  output logic [15:0] kalman_fallbacks,
  output logic        uart_irq
);
  ext_bus_if   ebus (.clk, .reset_n);
  avalon_mm_if av   (.clk, .reset_n);

  q97_t az_raw, el_raw, az_filt, el_filt, az_tx, el_tx;
  logic angle_valid, filt_valid;
  logic [15:0] bus_timeouts;
  logic az_hard, el_hard, az_soft, el_soft;

  kalman_avalon_bridge #(
    .UART_BASE(16'h0000), .POLL_DELAY(POLL_DELAY),
    .KALMAN_TIMEOUT(KALMAN_TIMEOUT), .BUS_TIMEOUT(BUS_TIMEOUT)
  ) u_kalman_bridge (
    .clk, .reset_n, .bus(ebus.master),
    .azimuth_raw(az_raw), .elevation_raw(el_raw), .angle_data_valid(angle_valid),
    .filtered_valid(filt_valid), .azimuth_filtered(az_filt), .elevation_filtered(el_filt),
    .azimuth_tx(az_tx), .elevation_tx(el_tx), .tx_count(packets_sent),
    .fallback_count(kalman_fallbacks), .bus_timeouts(bus_timeouts)
  );

  ext_bus_avalon_bridge u_bus_bridge (.clk, .reset_n, .e(ebus.slave), .m(av.master));

  uart_avalon #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .FIFO_DEPTH(UART_FIFO_DEPTH)) u_uart (
    .clk, .reset_n, .s(av.slave), .rxd(uart_rxd), .txd(uart_txd), .irq(uart_irq)
  );

  kalman_filter_top #(.TIMEOUT_CYCLES(KF_TIMEOUT)) u_kalman (
    .sys_clk(clk), .reset_n, .enable(filter_enable), .angle_data_valid(angle_valid),
    .azimuth_raw(az_raw), .elevation_raw(el_raw), .q_param, .r_param,
    .filtered_valid(filt_valid), .azimuth_filtered(az_filt), .elevation_filtered(el_filt),
    .filter_converged, .timeout_error(kf_timeout_error), .filter_error(kf_filter_error),
    .az_hard_reject(az_hard), .el_hard_reject(el_hard),
    .az_soft_scaled(az_soft), .el_soft_scaled(el_soft)
  );

  // processor-visible PIOs
  logic [3:0]       pio_read;
  logic [1:0]       pio_addr;
  logic [3:0][31:0] pio_rdata;
  logic             decode_miss;

  avalon_interconnect u_interconnect (
    .m_address(hps_address), .m_read(hps_read), .m_readdata(hps_readdata),
    .m_waitrequest(hps_waitrequest), .m_decode_miss(decode_miss),
    .s_read(pio_read), .s_address(pio_addr), .s_readdata(pio_rdata)
  );
  pio_in u_pio_az_raw      (.clk, .reset_n, .in_port(az_raw),  .address(pio_addr), .read(pio_read[0]), .readdata(pio_rdata[0]));
  pio_in u_pio_el_raw      (.clk, .reset_n, .in_port(el_raw),  .address(pio_addr), .read(pio_read[1]), .readdata(pio_rdata[1]));
  pio_in u_pio_az_filtered (.clk, .reset_n, .in_port(az_filt), .address(pio_addr), .read(pio_read[2]), .readdata(pio_rdata[2]));
  pio_in u_pio_el_filtered (.clk, .reset_n, .in_port(el_filt), .address(pio_addr), .read(pio_read[3]), .readdata(pio_rdata[3]));
endmodule
