// sync_edge_detect: two-flop synchroniser with rising-edge detector.
//
// `async_in` passes through two flip-flops (`level` is the synchronised
// copy); `rise` is a one-cycle pulse in the cycle after `level` goes from 0
// to 1. A level held high therefore produces exactly one pulse, which lets
// the filter start once per packet even if the valid signal is held.
// Latency: `rise` is high 3 clock edges after the input rises (2 synchroniser
// stages plus the edge register). Reset clears all stages.
//
// A two-stage synchroniser with an edge detector is what the filter
// subsystem calls for; the registered pulse and its 3-edge delay are this
// design's choice.
module sync_edge_detect (
  input  logic clk,
  input  logic reset_n,
  input  logic async_in,
  output logic level,
  output logic rise
);
  logic s1, s2, s3;
  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      s1   <= 1'b0;
      s2   <= 1'b0;
      s3   <= 1'b0;
      rise <= 1'b0;
    end else begin
      s1   <= async_in;
      s2   <= s1;
      s3   <= s2;
      rise <= s2 & ~s3;
    end
  end
  assign level = s2;
endmodule
