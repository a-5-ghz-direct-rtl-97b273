// tb_sine_weighted_dac: exhaustive check of the sine-weighted DAC over all 2048 phase words:
// the 10-bit code must equal the floating-point reference, stay within 2.5 LSB of an ideal
// sine, be mirrored about pi (code(p) + code(p + 1024) = 1023), and be symmetric about pi/2
// within the half wave (quadrant complementing).
module tb_sine_weighted_dac;
  import tb_dds_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [10:0] pw;
  logic [9:0]  dac_code;
  logic [8:0]  units, core;
  int          codes [2048];

  sine_weighted_dac dut (.phase_word(pw), .dac_code(dac_code), .units(units), .core(core));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: pw=%0d code=%0d", what, pw, dac_code);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real err, maxerr;
    maxerr = 0.0;
    for (int p = 0; p < 2048; p++) begin
      pw = 11'(p); #1;
      codes[p] = int'(dac_code);
      chk(int'(dac_code) == ref_code(p), $sformatf("reference %0d", ref_code(p)));
      err = real'(dac_code) - ideal_code(p);
      if (err < 0.0) err = -err;
      if (err > maxerr) maxerr = err;
      chk(err <= 2.5, "close to ideal sine");
    end
    for (int p = 0; p < 1024; p++) begin
      chk(codes[p] + codes[p + 1024] == 1023, "mirror about pi");
      if (p < 512) chk(codes[p] == codes[1023 - p], "symmetry about pi/2");
    end
    $display("max deviation from ideal sine = %0.3f LSB", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
