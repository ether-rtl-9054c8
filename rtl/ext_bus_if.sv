// ext_bus_if: the simple acknowledge-based external bus.
//
// A master raises `read` or `write` with `address`, `byteenable` and
// `writedata` and holds them until the slave pulses `acknowledge` for one
// cycle; for a read, `readdata` is valid in that cycle. The master drops its
// request in the cycle after the acknowledge. 16-bit data, 16-bit byte
// address. The assertions check that a pending request is not changed (a
// master may only abandon it) and that acknowledge is a single-cycle pulse.
//
// The signal names (address, byteenable, read, write, writedata, readdata,
// acknowledge), the 16-bit data and the 2-bit byte enable follow the bus
// timing the system describes; the 16-bit address width and the assertions
// are this design's choice.
interface ext_bus_if (
  input logic clk,
  input logic reset_n
);
  logic [15:0] address;
  logic [1:0]  byteenable;
  logic        read;
  logic        write;
  logic [15:0] writedata;
  logic [15:0] readdata;
  logic        acknowledge;

  modport master (output address, byteenable, read, write, writedata,
                  input  readdata, acknowledge);
  modport slave  (input  address, byteenable, read, write, writedata,
                  output readdata, acknowledge);

  assert property (@(posedge clk) disable iff (!reset_n) !(read && write));
  assert property (@(posedge clk) disable iff (!reset_n)
                   (read || write) && !acknowledge |=> !(read || write) || $stable({read, write, address}));
  assert property (@(posedge clk) disable iff (!reset_n) acknowledge |=> !acknowledge);
endinterface
