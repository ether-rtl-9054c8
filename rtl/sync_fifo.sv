// sync_fifo: single-clock FIFO with show-ahead read.
//
// DEPTH entries of WIDTH bits held in a register array with read and write
// pointers one bit wider than the address, so full and empty are told
// apart by the extra bit. `dout` always shows the oldest entry; `pop`
// removes it. A push when full or a pop when empty is ignored (the UART
// counts the former as an overrun). Push and pop may happen in one cycle.
//
// The system only asks for small (4 to 8 byte) UART FIFOs; the show-ahead
// organisation and the ignore-when-full/empty rule are this design's choice.
module sync_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 8
) (
  input  logic             clk,
  input  logic             reset_n,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  input  logic             pop,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic             full,
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wptr, rptr;

  assign count = ($clog2(DEPTH)+1)'(wptr - rptr);
  assign empty = (wptr == rptr);
  assign full  = (count == ($clog2(DEPTH)+1)'(DEPTH));
  assign dout  = mem[rptr[AW-1:0]];

  logic do_push, do_pop;
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (do_push) wptr <= wptr + 1'b1;
      if (do_pop)  rptr <= rptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr[AW-1:0]] <= din;
  end
endmodule
