// ether_pkg: types and constants shared by the solar-tracker FPGA fabric.
//
// Angles and covariances are carried as Q9.7 signed fixed point: 16 bits,
// 9 integer bits (sign included) and 7 fraction bits, so one degree is 128
// LSBs and the range is -256.0 .. +255.99. The servo range 0..180 degrees is
// 0..23040. The UART register offsets and the PIO base addresses are the
// ones of the system's memory map; the bit positions of RRDY/TRDY inside the
// UART status word are this design's choice (they follow the usual Avalon
// UART layout).
package ether_pkg;

  localparam int unsigned FRAC_BITS = 7;
  typedef logic signed [15:0] q97_t;

  localparam q97_t Q97_MAX = 16'sh7FFF;
  localparam q97_t Q97_MIN = -16'sh8000;
  localparam q97_t Q97_ONE = 16'sd128;

  // Servo range 0..180 degrees
  localparam q97_t ANGLE_MIN = 16'sd0;
  localparam q97_t ANGLE_MAX = 16'sd23040;

  // External bus between the Kalman bridge and the bus bridge
  localparam int unsigned EXT_ADDR_W = 16;
  localparam int unsigned EXT_DATA_W = 16;

  // UART register byte offsets
  localparam logic [EXT_ADDR_W-1:0] UART_RXDATA  = 16'h0000;
  localparam logic [EXT_ADDR_W-1:0] UART_TXDATA  = 16'h0004;
  localparam logic [EXT_ADDR_W-1:0] UART_STATUS  = 16'h0008;
  localparam logic [EXT_ADDR_W-1:0] UART_CONTROL = 16'h000C;

  // UART status bits
  localparam int unsigned ST_FE   = 1;  // framing error (sticky)
  localparam int unsigned ST_ROE  = 3;  // receive overrun (sticky)
  localparam int unsigned ST_TRDY = 6;  // transmit FIFO has room
  localparam int unsigned ST_RRDY = 7;  // receive FIFO holds a byte

  // HPS-visible PIO base addresses, 16-byte span each
  localparam logic [31:0] PIO_AZ_RAW_BASE      = 32'h1000_0000;
  localparam logic [31:0] PIO_EL_RAW_BASE      = 32'h1000_0010;
  localparam logic [31:0] PIO_AZ_FILTERED_BASE = 32'h1000_0020;
  localparam logic [31:0] PIO_EL_FILTERED_BASE = 32'h1000_0030;
  localparam logic [31:0] PIO_SPAN             = 32'h0000_0010;

  // Saturate a wide signed value into Q9.7
  function automatic q97_t sat16(input logic signed [33:0] v);
    if (v > 34'sd32767)       return Q97_MAX;
    else if (v < -34'sd32768) return Q97_MIN;
    else                      return q97_t'(v[15:0]);
  endfunction

  // Clamp to the servo range
  function automatic q97_t clamp_angle(input q97_t v);
    if (v < ANGLE_MIN)      return ANGLE_MIN;
    else if (v > ANGLE_MAX) return ANGLE_MAX;
    else                    return v;
  endfunction

endpackage
