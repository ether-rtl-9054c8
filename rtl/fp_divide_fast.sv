// fp_divide_fast: restoring divider for the Kalman gain K = P / (P + R).
//
// Both operands are non-negative Q9.7 values with num < den in normal use,
// so the quotient is a proper fraction. The divider therefore computes only
// fraction bits: a restoring loop of QBITS iterations (one per clock) forms
// floor(num * 2^QBITS / den), and the top 7 fraction bits become the Q9.7
// result (0 .. 127, i.e. 0 .. 0.992).
//
// Timing: `start` is sampled on one clock edge, the operands are loaded on
// that edge, QBITS edges iterate and one more edge registers the result and
// raises `done` for one cycle. With the default QBITS = 16 the result is
// therefore sampled by the consumer 18 clock edges after the edge that
// sampled `start`, the latency the filter was designed around. `start` is
// ignored while `busy`.
//
// Corner cases (this design's choice): num >= den gives exactly 1.0; a
// negative numerator or a non-positive denominator gives 0 and sets `err`.
//
// Because the quotient never exceeds 1.0, bits 15:8 of `quotient` are
// constant 0 after synthesis; the port keeps the Q9.7 width.
module fp_divide_fast
  import ether_pkg::*;
#(
  parameter int unsigned QBITS = 16
) (
  input  logic clk,
  input  logic reset_n,
  input  logic start,
  input  q97_t num,
  input  q97_t den,
  output q97_t quotient,
  output logic done,
  output logic busy,
  output logic err
);
  typedef enum logic [1:0] {D_IDLE, D_RUN, D_FINISH} dstate_t;
  dstate_t state;

  logic [15:0]      rem;
  logic [15:0]      den_r;
  logic [QBITS-1:0] q;
  logic [$clog2(QBITS)-1:0] cnt;
  logic             sat_one, bad;

  logic [16:0] rem2;
  assign rem2 = {rem, 1'b0};
  assign busy = (state != D_IDLE);

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      state    <= D_IDLE;
      rem      <= '0;
      den_r    <= '0;
      q        <= '0;
      cnt      <= '0;
      sat_one  <= 1'b0;
      bad      <= 1'b0;
      quotient <= '0;
      done     <= 1'b0;
      err      <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        D_IDLE: if (start) begin
          bad     <= (num < 0) || (den <= 0);
          sat_one <= (num >= den);
          rem     <= 16'(num);
          den_r   <= 16'(den);
          q       <= '0;
          cnt     <= '0;
          state   <= D_RUN;
        end
        D_RUN: begin
          if (rem2 >= {1'b0, den_r}) begin
            rem <= 16'(rem2 - {1'b0, den_r});
            q   <= {q[QBITS-2:0], 1'b1};
          end else begin
            rem <= rem2[15:0];
            q   <= {q[QBITS-2:0], 1'b0};
          end
          if (cnt == ($clog2(QBITS))'(QBITS - 1)) state <= D_FINISH;
          cnt <= cnt + 1'b1;
        end
        D_FINISH: begin
          if (bad)          quotient <= '0;
          else if (sat_one) quotient <= Q97_ONE;
          else              quotient <= q97_t'({9'd0, q[QBITS-1 -: FRAC_BITS]});
          err   <= bad;
          done  <= 1'b1;
          state <= D_IDLE;
        end
        default: state <= D_IDLE;
      endcase
    end
  end
endmodule
