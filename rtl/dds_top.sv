// dds_top: ROM-less direct digital synthesizer with direct frequency and phase modulation and
// PRBS spur randomisation.
//
// Data path, one clock per output sample:
//   fcw (24) -> phase_accumulator (24-bit ripple adder + register)
//            -> top 12 bits + pcw (12) + PRBS bit on the carry in (phase_modulator)
//            -> top 11 bits -> sine_weighted_dac -> 10-bit amplitude code
// Because both adders are ripple carry adders rather than a pipelined accumulator, fcw and
// pcw may change every clock: fcw takes effect at the next clock edge, pcw immediately on the
// combinational path to the DAC. Output frequency = fcw / 2^24 * f_clk; a pcw step of 0x800
// is a 180 degree phase step.
//
// Interface: clk, rst (synchronous, active high: clears the accumulator and loads the PRBS
// seed), fcw, pcw, dither_en (gates the PRBS bit into the carry in; the chip's means of turning
// dithering on and off is not documented, this enable is this design's), outputs dac_code
// (10-bit offset binary amplitude: 512 + A in the first half wave, 511 - A in the second),
// phase_word (11-bit DAC phase word), acc_phase (accumulator register), acc_wrap (the
// accumulator adder's carry out), prbs (the PRBS bit). The off-chip reconstruction filter
// that smooths the DAC steps is not part of this RTL.
module dds_top
  import dds_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic [PHASE_W-1:0]  fcw,
  input  logic [PM_W-1:0]     pcw,
  input  logic                dither_en,
  output logic [AMP_W-1:0]    dac_code,
  output logic [DAC_IN_W-1:0] phase_word,
  output logic [PHASE_W-1:0]  acc_phase,
  output logic                acc_wrap,
  output logic                prbs
);
  logic              prbs_n;
  logic [LFSR_W-1:0] prbs_state;
  logic [PM_W-1:0]   pm_sum;
  logic [CORE_W-1:0] dac_units;
  logic [CORE_W-1:0] dac_core;

  phase_accumulator u_acc (
    .clk  (clk),
    .rst  (rst),
    .fcw  (fcw),
    .phase(acc_phase),
    .wrap (acc_wrap)
  );

  prbs_lfsr u_prbs (
    .clk   (clk),
    .rst   (rst),
    .prbs  (prbs),
    .prbs_n(prbs_n),
    .state (prbs_state)
  );

  phase_modulator u_pm (
    .acc_phase (acc_phase),
    .pcw       (pcw),
    .dither    (prbs & dither_en),
    .pm_sum    (pm_sum),
    .phase_word(phase_word)
  );

  sine_weighted_dac u_dac (
    .phase_word(phase_word),
    .dac_code  (dac_code),
    .units     (dac_units),
    .core      (dac_core)
  );
endmodule
