// tb_dds_ref_pkg: reference model of the synthesizer for the testbenches.
//
// Computes, with floating-point $sin rather than the RTL's integer series, what the DAC
// should put out: the quarter-wave level S(p) = round(510 * sin(pi/2 * (p + 0.5) / 512)),
// coarse level S(8c), fine interpolation round(f * (S(64r+64) - S(64r)) / 64), 1's complement
// in quadrants 2 and 4 and mirroring by the MSB into a 10-bit offset-binary code, and an
// ideal sine on the same scale for accuracy checks.
package tb_dds_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  function automatic int ref_s(input int p);
    real x;
    x = PI / 2.0 * (real'(p) + 0.5) / 512.0;
    return $rtoi(510.0 * $sin(x) + 0.5);
  endfunction

  // quarter-wave magnitude for a 9-bit core value
  function automatic int ref_units(input int core);
    int c, r, f, delta, fine;
    c     = core / 8;
    r     = core / 64;
    f     = core % 8;
    delta = ref_s(64 * r + 64) - ref_s(64 * r);
    fine  = $rtoi($floor(real'(f) * real'(delta) / 64.0 + 0.5));
    return ref_s(8 * c) + fine;
  endfunction

  // 11-bit phase word to 10-bit code
  function automatic int ref_code(input int pw);
    int msb, quad, core;
    msb  = (pw >> 10) & 1;
    quad = (pw >> 9) & 1;
    core = pw & 511;
    if (quad != 0) core = 511 - core;
    return (msb != 0) ? 511 - ref_units(core) : 512 + ref_units(core);
  endfunction

  // ideal sine at the centre of the phase step, on the same 10-bit scale
  function automatic real ideal_code(input int pw);
    return 511.5 + 510.0 * $sin(2.0 * PI * (real'(pw) + 0.5) / 2048.0);
  endfunction

endpackage
