// dds_pkg: widths, the phase-word layout and the sine-weight functions shared by the
// ROM-less direct digital synthesizer.
//
// The synthesizer accumulates a 24-bit frequency control word (FCW), keeps the top 12 bits,
// adds a 12-bit phase control word (PCW) plus a 1-bit dither, and sends the top 11 bits of that
// sum to a segmented sine-weighted DAC. The 11-bit DAC word is split as
//   bit 10      MSB    : selects the half wave (mirrors the output about the pi point)
//   bit  9      quad   : second MSB, selects 1's complement of the core bits (quadrants 2 and 4)
//   bits 8..0   core   : 9-bit quarter-wave phase; bits 8..3 drive the 6-bit coarse DAC,
//                        bits 8..6 also select one of the eight fine DACs, bits 2..0 drive it.
// All widths are the ones of the chip described in the literature this design follows.
//
// Sine weights (own choice, the cell weights are computed, not tabulated):
//   S(p)    = round(AMP_FULL * sin(pi/2 * (p + 0.5) / 512)),      p = 0..512
//   coarse level after c coarse cells  = S(8c)
//     -> one always-on cell of weight S(0) and switched cells k = 0..62 of weight
//        S(8k+8) - S(8k)
//   fine level of fine DAC r after f cells = round(f * (S(64r+64) - S(64r)) / 64)
//     -> switched cells j = 0..6 of weight F_r(j+1) - F_r(j)
//   quarter-wave amplitude A(p) = S(8*(p>>3)) + F_(p>>6)(p & 7)
// AMP_FULL = 510 keeps A(p) <= 511, so the mirrored 10-bit code never overflows. With it the
// largest cell holds 13 unit currents and the fine DACs hold from 11 down to 1 unit, the
// figures the chip's DAC is built with. sin() is evaluated with an integer Taylor series in
// Q2.30 fixed point so that the weights are elaboration-time constants for every tool.
package dds_pkg;

  localparam int PHASE_W   = 24;  // accumulator / FCW width
  localparam int PM_W      = 12;  // phase modulation adder / PCW width
  localparam int DAC_IN_W  = 11;  // phase word into the sine-weighted DAC
  localparam int CORE_W    = 9;   // quarter-wave DAC core width
  localparam int COARSE_W  = 6;   // coarse thermometer DAC width
  localparam int FINE_W    = 3;   // fine thermometer DAC width
  localparam int AMP_W     = 10;  // output amplitude resolution
  localparam int LFSR_W    = 13;  // PRBS register length

  localparam int N_COARSE  = 1 << COARSE_W;  // 64 cell positions (63 switched + 1 always on)
  localparam int N_FINE_DAC = 8;             // eight fine DACs
  localparam int N_FINE_CELL = 8;            // 8 positions per fine DAC (7 switched)

  localparam int AMP_FULL  = 510;            // peak of the ideal quarter wave, in unit currents

  // 11-bit phase word into the DAC
  typedef struct packed {
    logic                msb;   // half-wave select
    logic                quad;  // second MSB: complement the core
    logic [CORE_W-1:0]   core;  // quarter-wave phase
  } phase_word_t;

  // round(AMP_FULL * sin(pi/2 * (p + 0.5) / 512)) with integer arithmetic only
  function automatic int sine_level(input int p);
    longint pi_q30;
    longint x;
    longint term;
    longint sum;
    pi_q30 = 64'd3373259426;                       // pi * 2^30
    x      = (pi_q30 * longint'(2 * p + 1)) / 2048; // pi/2 * (p+0.5)/512 in Q2.30
    term   = x;
    sum    = x;
    for (int k = 1; k <= 9; k++) begin
      term = (term * x) >>> 30;
      term = (term * x) >>> 30;
      term = -term / longint'((2 * k) * (2 * k + 1));
      sum  = sum + term;
    end
    return int'((longint'(AMP_FULL) * sum + (64'sd1 <<< 29)) >>> 30);
  endfunction

  // weight of the always-on coarse cell (coarse level at code 0)
  function automatic int coarse_base_weight();
    return sine_level(0);
  endfunction

  // weight of switched coarse cell k (on when the coarse code exceeds k), k = 0..62
  function automatic int coarse_weight(input int k);
    if (k >= N_COARSE - 1) return 0;
    return sine_level(8 * k + 8) - sine_level(8 * k);
  endfunction

  // level of fine DAC r with f cells on
  function automatic int fine_level(input int r, input int f);
    int delta;
    delta = sine_level(64 * r + 64) - sine_level(64 * r);
    return (2 * f * delta + 64) / 128;
  endfunction

  // weight of switched cell j of fine DAC r (on when the fine code exceeds j), j = 0..6
  function automatic int fine_weight(input int r, input int j);
    if (j >= N_FINE_CELL - 1) return 0;
    return fine_level(r, j + 1) - fine_level(r, j);
  endfunction

endpackage
