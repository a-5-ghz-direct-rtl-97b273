// prbs_lfsr: 13-bit Fibonacci linear feedback shift register for LSB phase dithering.
//
// Thirteen flip-flops form a shift chain; an XOR of tapped stages is fed back into the first
// stage and the last stage is the output bit. With the taps at stages 13, 12, 10 and 9
// (polynomial x^13 + x^12 + x^10 + x^9 + 1, a maximal-length choice of this design) the bit
// stream repeats only after 2^13 - 1 = 8191 clocks, the period the chip's generator has.
// The chip uses differential flip-flops with true and complementary outputs; here the
// complement is the inverse of the output bit.
//
// Interface: clk, rst (synchronous, active high; loads the all-ones state, a value chosen here
// because the all-zeros state would lock the register), prbs (output bit, last stage),
// prbs_n (its complement), state (the 13 stages, stage 1 in bit 0, for observation).
module prbs_lfsr
  import dds_pkg::*;
#(
  parameter logic [LFSR_W-1:0] SEED = '1
) (
  input  logic              clk,
  input  logic              rst,
  output logic              prbs,
  output logic              prbs_n,
  output logic [LFSR_W-1:0] state
);
  logic feedback;

  // taps: stages 13, 12, 10, 9 (stage n is state[n-1])
  assign feedback = state[12] ^ state[11] ^ state[9] ^ state[8];

  always_ff @(posedge clk) begin
    if (rst) state <= SEED;
    else     state <= {state[LFSR_W-2:0], feedback};
  end

  assign prbs   = state[LFSR_W-1];
  assign prbs_n = ~prbs;
endmodule
