// ext_bus_avalon_bridge: external-bus slave to Avalon-MM master.
//
// Converts the acknowledge handshake of the Kalman bridge into Avalon-MM
// transfers with wait request, and adapts 16-bit data to the 32-bit Avalon
// word: address bit 1 selects the upper or lower half, the byte enables are
// shifted to match and write data is replicated into both halves.
// A request is latched in the cycle it appears, presented on the Avalon side
// until `waitrequest` is low, and then acknowledged with a one-cycle
// `acknowledge` pulse that carries the read data. One transfer at a time;
// at least 3 cycles per transfer (latch, Avalon cycle, acknowledge).
// The role of this block follows the system integration; the timing details
// and width adaptation are this design's choice.
module ext_bus_avalon_bridge (
  input logic clk,
  input logic reset_n,
  ext_bus_if.slave   e,
  avalon_mm_if.master m
);
  typedef enum logic [1:0] {B_IDLE, B_BUS, B_ACK} bstate_t;
  bstate_t state;
  logic [15:0] addr_q, wdata_q, rdata_q;
  logic [1:0]  be_q;
  logic        rd_q, wr_q;

  assign m.address    = {addr_q[15:2], 2'b00};
  assign m.read       = (state == B_BUS) && rd_q;
  assign m.write      = (state == B_BUS) && wr_q;
  assign m.writedata  = {wdata_q, wdata_q};
  assign m.byteenable = addr_q[1] ? {be_q, 2'b00} : {2'b00, be_q};
  assign e.acknowledge = (state == B_ACK);
  assign e.readdata    = rdata_q;

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      state   <= B_IDLE;
      addr_q  <= '0;
      wdata_q <= '0;
      rdata_q <= '0;
      be_q    <= '0;
      rd_q    <= 1'b0;
      wr_q    <= 1'b0;
    end else begin
      unique case (state)
        B_IDLE: if (e.read || e.write) begin
          addr_q  <= e.address;
          wdata_q <= e.writedata;
          be_q    <= e.byteenable;
          rd_q    <= e.read;
          wr_q    <= e.write;
          state   <= B_BUS;
        end
        B_BUS: if (!m.waitrequest) begin
          rdata_q <= addr_q[1] ? m.readdata[31:16] : m.readdata[15:0];
          state   <= B_ACK;
        end
        B_ACK: state <= B_IDLE;
        default: state <= B_IDLE;
      endcase
    end
  end
endmodule
