// phase_modulator: 12-bit phase modulation adder with LSB dither on the carry in.
//
// The accumulator phase is truncated to its top 12 bits, and a 12-bit ripple carry adder adds
// the phase control word (PCW) to it. The 1-bit pseudorandom dither enters as the carry in of
// the first bit, so on average it adds half an LSB of the 12-bit word and randomises the
// truncation error. The sum is truncated again and its top 11 bits form the DAC phase word.
// A PCW of 0x800 shifts the output by 180 degrees.
//
// Interface: acc_phase (24 bits), pcw (12 bits), dither (1 bit); phase_word (11 bits) and
// pm_sum (the full 12-bit sum). Combinational, like the chip's adder between the accumulator
// flip-flops and the DAC.
module phase_modulator
  import dds_pkg::*;
(
  input  logic [PHASE_W-1:0]  acc_phase,
  input  logic [PM_W-1:0]     pcw,
  input  logic                dither,
  output logic [PM_W-1:0]     pm_sum,
  output logic [DAC_IN_W-1:0] phase_word
);
  logic carry_out;  // modulo-2^12 phase: the carry out is dropped

  ripple_carry_adder #(.WIDTH(PM_W)) u_rca (
    .a   (acc_phase[PHASE_W-1 -: PM_W]),
    .b   (pcw),
    .cin (dither),
    .sum (pm_sum),
    .cout(carry_out)
  );

  assign phase_word = pm_sum[PM_W-1 -: DAC_IN_W];
endmodule
