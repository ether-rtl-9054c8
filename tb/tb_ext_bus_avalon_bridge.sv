// tb_ext_bus_avalon_bridge: an external-bus master issues reads and writes
// at 16-bit half-word addresses to a 32-bit Avalon memory model that
// inserts a random number of wait states. Checks the data of every read,
// the placement and byte enables of every write, and that `acknowledge` is
// a one-cycle pulse per transfer.
//
// The stimulus and the reference computations are this testbench's own;
// the behaviour it checks is the one the design specifies.
module tb_ext_bus_avalon_bridge;
  logic clk = 0, reset_n = 0;
  int checks = 0, failures = 0;
  ext_bus_if   e (.clk, .reset_n);
  avalon_mm_if m (.clk, .reset_n);
  ext_bus_avalon_bridge dut (.clk, .reset_n, .e(e.slave), .m(m.master));
  always #5 clk = ~clk;

  // Avalon slave: 16 words, random wait states
  logic [31:0] mem [16];
  int waits;
  logic [1:0] wcnt;
  assign m.waitrequest = (m.read || m.write) && (wcnt != 0);
  assign m.readdata = mem[m.address[5:2]];
  always_ff @(posedge clk) begin
    if ((m.read || m.write) && wcnt != 0) wcnt <= wcnt - 1'b1;
    else if (m.read || m.write) begin
      wcnt <= 2'($urandom_range(0, 3));
      if (m.write)
        for (int b = 0; b < 4; b++) if (m.byteenable[b]) mem[m.address[5:2]][8*b +: 8] <= m.writedata[8*b +: 8];
    end
  end

  logic [15:0] shadow [32];   // half-word model of the memory

  task automatic xfer(input logic wr, input logic [15:0] addr, input logic [15:0] wdata, output logic [15:0] rdata);
    int n;
    @(negedge clk);
    e.address = addr; e.byteenable = 2'b11; e.writedata = wdata; e.read = !wr; e.write = wr;
    n = 0;
    do begin @(posedge clk); n++; end while (!e.acknowledge && n < 50);
    rdata = e.readdata;
    checks++; if (!e.acknowledge) begin failures++; $display("FAIL no acknowledge"); end
    @(negedge clk); e.read = 0; e.write = 0;
    @(posedge clk);
    checks++; if (e.acknowledge) begin failures++; $display("FAIL acknowledge held"); end
  endtask

  initial begin
    logic [15:0] r;
    wcnt = 0;
    e.read = 0; e.write = 0; e.address = 0; e.writedata = 0; e.byteenable = 0;
    for (int i = 0; i < 16; i++) begin mem[i] = 32'($urandom); shadow[2*i] = mem[i][15:0]; shadow[2*i+1] = mem[i][31:16]; end
    repeat (3) @(posedge clk);
    reset_n = 1;
    repeat (300) begin
      logic [4:0] h;
      logic wr;
      logic [15:0] d;
      h = 5'($urandom); wr = $urandom_range(0, 1) == 1; d = 16'($urandom);
      xfer(wr, {10'd0, h, 1'b0}, d, r);
      if (wr) shadow[h] = d;
      else begin
        checks++;
        if (r != shadow[h]) begin failures++; $display("FAIL read half %0d = %h expected %h", h, r, shadow[h]); end
      end
    end
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (mem[i] != {shadow[2*i+1], shadow[2*i]}) begin failures++; $display("FAIL word %0d = %h", i, mem[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
