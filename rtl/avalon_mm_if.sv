// avalon_mm_if: Avalon memory-mapped bus with wait request.
//
// A master holds `read` or `write` (with `address`, `writedata`,
// `byteenable`) until it samples `waitrequest` low; in that cycle a read's
// `readdata` is valid and the transfer ends. No pipelining, no bursts. The
// assertions check that a stalled request is held stable.
//
// The signal set is the usual Avalon-MM one that the system uses between its
// components; the 32-bit data width and the assertions are this design's
// choice.
interface avalon_mm_if (
  input logic clk,
  input logic reset_n
);
  logic [15:0] address;
  logic        read;
  logic        write;
  logic [31:0] writedata;
  logic [3:0]  byteenable;
  logic [31:0] readdata;
  logic        waitrequest;

  modport master (output address, read, write, writedata, byteenable,
                  input  readdata, waitrequest);
  modport slave  (input  address, read, write, writedata, byteenable,
                  output readdata, waitrequest);

  assert property (@(posedge clk) disable iff (!reset_n) !(read && write));
  assert property (@(posedge clk) disable iff (!reset_n)
                   (read || write) && waitrequest |=> $stable({read, write, address, writedata}));
endinterface
