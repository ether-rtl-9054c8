// avalon_interconnect: address decoder from the processor's master port to
// the PIO slaves.
//
// Each slave owns SPAN bytes from its entry in BASES. A read whose address
// falls in a slave's window raises that slave's `s_read` and passes the word
// offset inside the window on `s_address`; the selected slave's data is
// returned on `m_readdata` in the same cycle. An address that matches no
// slave reads as 0 and sets `m_decode_miss` in that cycle. No wait states.
// The base addresses (0x1000_0000, _0010, _0020, _0030) and the 16-byte
// spans are those of the system's address map.
//
// `m_waitrequest` is constant 0 because no slave needs wait states; it is
// kept so the port is a complete Avalon-MM slave interface.
module avalon_interconnect
  import ether_pkg::*;
#(
  parameter int unsigned NUM_SLAVES = 4,
  parameter logic [NUM_SLAVES-1:0][31:0] BASES =
    {PIO_EL_FILTERED_BASE, PIO_AZ_FILTERED_BASE, PIO_EL_RAW_BASE, PIO_AZ_RAW_BASE},
  parameter logic [31:0] SPAN = PIO_SPAN
) (
  input  logic [31:0]           m_address,
  input  logic                  m_read,
  output logic [31:0]           m_readdata,
  output logic                  m_waitrequest,
  output logic                  m_decode_miss,
  output logic [NUM_SLAVES-1:0] s_read,
  output logic [1:0]            s_address,
  input  logic [NUM_SLAVES-1:0][31:0] s_readdata
);
  logic [NUM_SLAVES-1:0] hit;
  always_comb begin
    m_readdata = '0;
    for (int i = 0; i < NUM_SLAVES; i++) begin
      hit[i] = (m_address >= BASES[i]) && (m_address < BASES[i] + SPAN);
      if (hit[i]) m_readdata = s_readdata[i];
    end
    s_read        = hit & {NUM_SLAVES{m_read}};
    s_address     = m_address[3:2];
    m_decode_miss = m_read && (hit == '0);
    m_waitrequest = 1'b0;
  end
endmodule
