// sine_weighted_dac: 10-bit segmented sine-weighted DAC (phase to amplitude, ROM-less).
//
// The 11-bit phase word is split into MSB, second MSB and a 9-bit core. The second MSB makes
// a 1's complementor invert the core in quadrants 2 and 4, so the core DAC sees a quarter-wave
// phase. Its top six bits drive the thermometer-coded coarse DAC (row decoder on core<8:6>,
// column decoder on core<5:3>); core<8:6> also selects one of eight 3-bit fine DACs, whose
// cells core<2:0> turns on. The cells of both arrays carry sine-weighted currents, so their
// sum is already the sine amplitude: no ROM look-up is needed. The MSB mirrors the result
// about the pi point, giving a 10-bit amplitude. The partition follows the chip; the cell
// weights and the offset-binary output code are this design's (see dds_pkg and
// current_source_array).
//
// Interface: phase_word (11 bits); dac_code (10-bit offset binary amplitude), units (9-bit
// quarter-wave magnitude), core (9-bit complementor output). Combinational.
module sine_weighted_dac
  import dds_pkg::*;
(
  input  logic [DAC_IN_W-1:0] phase_word,
  output logic [AMP_W-1:0]    dac_code,
  output logic [CORE_W-1:0]   units,
  output logic [CORE_W-1:0]   core
);
  phase_word_t pw;
  assign pw = phase_word_t'(phase_word);

  logic [N_COARSE-2:0]                    coarse_on;
  logic [N_FINE_DAC-1:0][N_FINE_CELL-2:0] fine_on;

  ones_complementor #(.WIDTH(CORE_W)) u_comp (
    .in    (pw.core),
    .invert(pw.quad),
    .out   (core)
  );

  coarse_dac_switch_matrix u_coarse (
    .code   (core[CORE_W-1 -: COARSE_W]),
    .cell_on(coarse_on)
  );

  fine_dac_switch_matrix u_fine (
    .sel    (core[CORE_W-1 -: 3]),
    .code   (core[FINE_W-1:0]),
    .cell_on(fine_on)
  );

  current_source_array u_array (
    .coarse_on(coarse_on),
    .fine_on  (fine_on),
    .msb      (pw.msb),
    .units    (units),
    .dac_code (dac_code)
  );
endmodule
