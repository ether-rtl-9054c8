// pio_in: input-only parallel I/O port readable over Avalon-MM.
//
// `in_port` is registered every clock; a read at word offset 0 returns the
// registered value zero-extended to 32 bits, other offsets read as 0. Reads
// complete without wait states (`readdata` is valid in the cycle of
// `read`). Writes have no effect, as for an input-only port. The four
// instances make the raw and filtered angles visible to the processor.
//
// Four 16-bit input ports in 16-byte windows are as specified; registering
// the input and reading 0 at the other offsets are this design's choices.
//
// `readdata` bits 31:WIDTH are constant 0 (zero extension of the 16-bit
// port).
module pio_in #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             reset_n,
  input  logic [WIDTH-1:0] in_port,
  input  logic [1:0]       address,   // word offset inside the 16-byte span
  input  logic             read,
  output logic [31:0]      readdata
);
  logic [WIDTH-1:0] data_q;
  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) data_q <= '0;
    else          data_q <= in_port;
  end
  assign readdata = (read && address == 2'd0) ? 32'(data_q) : 32'd0;
endmodule
