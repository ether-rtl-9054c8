// kalman_avalon_bridge: packet engine between the UART and the filters.
//
// A state machine masters the external bus to the UART registers:
//  RX phase : IDLE waits POLL_DELAY+1 cycles, then CHECK_RRDY/WAIT_RRDY read
//             STATUS until RRDY is set, READ_BYTE/WAIT_READ read one byte
//             from RXDATA and ASSEMBLE stores it, four times, forming the
//             packet [AZ_H][AZ_L][EL_H][EL_L] of two Q9.7 angles.
//  Kalman   : TRIGGER_KALMAN presents the angles and raises
//             `angle_data_valid` (held through WAIT_KALMAN); WAIT_KALMAN
//             waits for `filtered_valid`. If it has not come after
//             KALMAN_TIMEOUT cycles the raw angles are sent back instead
//             and `fallback_count` is incremented.
//  TX phase : CHECK_TRDY/WAIT_TRDY read STATUS until TRDY is set,
//             WRITE_BYTE/WAIT_WRITE write one byte to TXDATA and
//             TRANSMIT_NEXT moves on, four times, in the same byte order.
//             After the fourth byte `tx_count` is incremented.
// Timeouts: while waiting for RRDY or TRDY, if BUS_TIMEOUT cycles pass
// without a byte being moved the machine returns to IDLE, dropping any
// partial packet (so the link re-aligns on packet boundaries after a gap);
// a bus access not acknowledged within ACK_TIMEOUT cycles is abandoned the
// same way. Both are counted in `bus_timeouts`.
//
// The states, their order, the 255-cycle poll delay, the byte order and the
// 10 ms (500000 cycles at 50 MHz) raw-value fallback follow the bridge
// description; the bus timeout lengths, the resynchronising behaviour and
// the counters are this design's choices.
module kalman_avalon_bridge
  import ether_pkg::*;
#(
  parameter logic [15:0] UART_BASE      = 16'h0000,
  parameter int unsigned POLL_DELAY     = 255,
  parameter int unsigned KALMAN_TIMEOUT = 500_000,
  parameter int unsigned BUS_TIMEOUT    = 500_000,
  parameter int unsigned ACK_TIMEOUT    = 255
) (
  input  logic clk,
  input  logic reset_n,
  ext_bus_if.master bus,
  // to and from the Kalman filter subsystem
  output q97_t azimuth_raw,
  output q97_t elevation_raw,
  output logic angle_data_valid,
  input  logic filtered_valid,
  input  q97_t azimuth_filtered,
  input  q97_t elevation_filtered,
  // status
  output q97_t        azimuth_tx,
  output q97_t        elevation_tx,
  output logic [15:0] tx_count,
  output logic [15:0] fallback_count,
  output logic [15:0] bus_timeouts
);
  typedef enum logic [3:0] {
    IDLE, CHECK_RRDY, WAIT_RRDY, READ_BYTE, WAIT_READ, ASSEMBLE,
    TRIGGER_KALMAN, WAIT_KALMAN,
    CHECK_TRDY, WAIT_TRDY, WRITE_BYTE, WAIT_WRITE, TRANSMIT_NEXT
  } bstate_t;
  bstate_t state;

  localparam int unsigned TMAX = (KALMAN_TIMEOUT > BUS_TIMEOUT) ? KALMAN_TIMEOUT : BUS_TIMEOUT;
  localparam int unsigned TW   = $clog2(TMAX + 1);
  localparam int unsigned PW   = $clog2(POLL_DELAY + 1);
  localparam int unsigned AW   = $clog2(ACK_TIMEOUT + 1);

  logic [PW-1:0] poll_delay;
  logic [TW-1:0] wait_cnt;
  logic [AW-1:0] ack_cnt;
  logic [1:0]    idx;
  logic [31:0]   pkt;
  logic          bus_tmo, ack_tmo;

  assign bus_tmo = (wait_cnt >= TW'(BUS_TIMEOUT));
  assign ack_tmo = (ack_cnt  >= AW'(ACK_TIMEOUT));

  logic [7:0] tx_byte;
  always_comb begin
    unique case (idx)
      2'd0: tx_byte = azimuth_tx[15:8];
      2'd1: tx_byte = azimuth_tx[7:0];
      2'd2: tx_byte = elevation_tx[15:8];
      default: tx_byte = elevation_tx[7:0];
    endcase
  end

  assign bus.byteenable = 2'b01;

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      state            <= IDLE;
      poll_delay       <= '0;
      wait_cnt         <= '0;
      ack_cnt          <= '0;
      idx              <= '0;
      pkt              <= '0;
      bus.address      <= '0;
      bus.read         <= 1'b0;
      bus.write        <= 1'b0;
      bus.writedata    <= '0;
      azimuth_raw      <= '0;
      elevation_raw    <= '0;
      angle_data_valid <= 1'b0;
      azimuth_tx       <= '0;
      elevation_tx     <= '0;
      tx_count         <= '0;
      fallback_count   <= '0;
      bus_timeouts     <= '0;
    end else begin
      if (wait_cnt != '1) wait_cnt <= wait_cnt + 1'b1;
      ack_cnt <= (bus.read || bus.write) ? ack_cnt + 1'b1 : '0;

      unique case (state)
        IDLE: begin
          if (poll_delay == PW'(POLL_DELAY)) begin
            poll_delay <= '0;
            idx        <= '0;
            wait_cnt   <= '0;
            state      <= CHECK_RRDY;
          end else begin
            poll_delay <= poll_delay + 1'b1;
          end
        end

        // ---------------- RX phase ----------------
        CHECK_RRDY: begin
          bus.address <= UART_BASE + UART_STATUS;
          bus.read    <= 1'b1;
          state       <= WAIT_RRDY;
        end
        WAIT_RRDY: begin
          if (bus.acknowledge) begin
            bus.read <= 1'b0;
            if (bus.readdata[ST_RRDY]) state <= READ_BYTE;
            else if (bus_tmo) begin
              bus_timeouts <= bus_timeouts + 1'b1;
              state        <= IDLE;
            end else state <= CHECK_RRDY;
          end else if (ack_tmo) begin
            bus.read     <= 1'b0;
            bus_timeouts <= bus_timeouts + 1'b1;
            state        <= IDLE;
          end
        end
        READ_BYTE: begin
          bus.address <= UART_BASE + UART_RXDATA;
          bus.read    <= 1'b1;
          state       <= WAIT_READ;
        end
        WAIT_READ: begin
          if (bus.acknowledge) begin
            bus.read <= 1'b0;
            pkt      <= {pkt[23:0], bus.readdata[7:0]};
            state    <= ASSEMBLE;
          end else if (ack_tmo) begin
            bus.read     <= 1'b0;
            bus_timeouts <= bus_timeouts + 1'b1;
            state        <= IDLE;
          end
        end
        ASSEMBLE: begin
          wait_cnt <= '0;
          if (idx == 2'd3) begin
            azimuth_raw   <= q97_t'(pkt[31:16]);
            elevation_raw <= q97_t'(pkt[15:0]);
            state         <= TRIGGER_KALMAN;
          end else begin
            idx   <= idx + 2'd1;
            state <= CHECK_RRDY;
          end
        end

        // ---------------- Kalman ----------------
        TRIGGER_KALMAN: begin
          angle_data_valid <= 1'b1;
          wait_cnt         <= '0;
          state            <= WAIT_KALMAN;
        end
        WAIT_KALMAN: begin
          if (filtered_valid) begin
            azimuth_tx       <= azimuth_filtered;
            elevation_tx     <= elevation_filtered;
            angle_data_valid <= 1'b0;
            idx              <= '0;
            wait_cnt         <= '0;
            state            <= CHECK_TRDY;
          end else if (wait_cnt >= TW'(KALMAN_TIMEOUT)) begin
            azimuth_tx       <= azimuth_raw;
            elevation_tx     <= elevation_raw;
            angle_data_valid <= 1'b0;
            fallback_count   <= fallback_count + 1'b1;
            idx              <= '0;
            wait_cnt         <= '0;
            state            <= CHECK_TRDY;
          end
        end

        // ---------------- TX phase ----------------
        CHECK_TRDY: begin
          bus.address <= UART_BASE + UART_STATUS;
          bus.read    <= 1'b1;
          state       <= WAIT_TRDY;
        end
        WAIT_TRDY: begin
          if (bus.acknowledge) begin
            bus.read <= 1'b0;
            if (bus.readdata[ST_TRDY]) state <= WRITE_BYTE;
            else if (bus_tmo) begin
              bus_timeouts <= bus_timeouts + 1'b1;
              state        <= IDLE;
            end else state <= CHECK_TRDY;
          end else if (ack_tmo) begin
            bus.read     <= 1'b0;
            bus_timeouts <= bus_timeouts + 1'b1;
            state        <= IDLE;
          end
        end
        WRITE_BYTE: begin
          bus.address   <= UART_BASE + UART_TXDATA;
          bus.writedata <= {8'd0, tx_byte};
          bus.write     <= 1'b1;
          state         <= WAIT_WRITE;
        end
        WAIT_WRITE: begin
          if (bus.acknowledge) begin
            bus.write <= 1'b0;
            state     <= TRANSMIT_NEXT;
          end else if (ack_tmo) begin
            bus.write    <= 1'b0;
            bus_timeouts <= bus_timeouts + 1'b1;
            state        <= IDLE;
          end
        end
        TRANSMIT_NEXT: begin
          wait_cnt <= '0;
          if (idx == 2'd3) begin
            tx_count <= tx_count + 1'b1;
            state    <= IDLE;
          end else begin
            idx   <= idx + 2'd1;
            state <= CHECK_TRDY;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
