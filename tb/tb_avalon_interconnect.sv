// tb_avalon_interconnect: each of the four PIO windows (0x1000_0000 +
// 0x10*i, 16 bytes) routes the read to its slave and returns its data;
// addresses outside every window read 0 and flag a decode miss.
//
// The stimulus and the reference computations are this testbench's own;
// the behaviour it checks is the one the design specifies.
module tb_avalon_interconnect;
  logic [31:0] m_address, m_readdata;
  logic m_read, m_waitrequest, m_decode_miss;
  logic [3:0] s_read;
  logic [1:0] s_address;
  logic [3:0][31:0] s_readdata;
  int checks = 0, failures = 0;
  avalon_interconnect dut (.m_address, .m_read, .m_readdata, .m_waitrequest, .m_decode_miss,
                           .s_read, .s_address, .s_readdata);
  // slave models: data depends on slave index and offset
  always_comb for (int i = 0; i < 4; i++) s_readdata[i] = s_read[i] ? (32'hA000_0000 | (i << 8) | s_address) : 32'd0;

  initial begin
    m_read = 1;
    for (int i = 0; i < 4; i++)
      for (int off = 0; off < 16; off += 4) begin
        m_address = 32'h1000_0000 + 32'(i * 16 + off); #1;
        checks++;
        if (s_read != 4'(1 << i) || m_readdata != (32'hA000_0000 | (i << 8) | (off >> 2)) || m_decode_miss || m_waitrequest) begin
          failures++; $display("FAIL addr %h: s_read=%b data=%h miss=%b", m_address, s_read, m_readdata, m_decode_miss);
        end
      end
    for (int k = 0; k < 4; k++) begin
      m_address = (k == 0) ? 32'h1000_0040 : (k == 1) ? 32'h0FFF_FFFC : (k == 2) ? 32'h0000_0000 : 32'h2000_0020; #1;
      checks++;
      if (s_read != 0 || m_readdata != 0 || !m_decode_miss) begin failures++; $display("FAIL unmapped %h", m_address); end
    end
    m_read = 0; m_address = 32'h1000_0020; #1;
    checks++; if (s_read != 0 || m_decode_miss) begin failures++; $display("FAIL strobe without read"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
