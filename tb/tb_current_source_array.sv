// tb_current_source_array: drives the cell enables of the coarse and fine arrays as the
// decoders would for every 9-bit quarter-wave value and both MSB settings, and compares the
// number of conducting unit currents and the mirrored 10-bit code with the floating-point
// reference. It also switches single cells on to measure each cell's weight: the largest
// coarse cell must hold 13 unit currents (338 uA at 26 uA per unit), and the first and last
// fine DACs 11 and 1 unit currents in all.
module tb_current_source_array;
  import tb_dds_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [62:0]     coarse_on;
  logic [7:0][6:0] fine_on;
  logic            msb;
  logic [8:0]      units;
  logic [9:0]      dac_code;

  current_source_array dut (.coarse_on(coarse_on), .fine_on(fine_on), .msb(msb),
                            .units(units), .dac_code(dac_code));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: units=%0d code=%0d", what, units, dac_code);
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
    int base, w, wmax, total;
    for (int p = 0; p < 512; p++) begin
      for (int m = 0; m < 2; m++) begin
        for (int k = 0; k < 63; k++) coarse_on[k] = (k < p / 8);
        for (int r = 0; r < 8; r++)
          for (int j = 0; j < 7; j++) fine_on[r][j] = (r == p / 64) && (j < p % 8);
        msb = 1'(m);
        #1;
        chk(int'(units) == ref_units(p), $sformatf("units p=%0d ref=%0d", p, ref_units(p)));
        chk(int'(dac_code) == (m != 0 ? 511 - ref_units(p) : 512 + ref_units(p)),
            $sformatf("mirrored code p=%0d msb=%0d", p, m));
      end
    end
    // single-cell weights
    msb = 0; coarse_on = '0; fine_on = '0; #1;
    base = int'(units);
    wmax = 0; total = base;
    for (int k = 0; k < 63; k++) begin
      coarse_on = '0; coarse_on[k] = 1'b1; #1;
      w = int'(units) - base;
      total += w;
      if (w > wmax) wmax = w;
    end
    $display("largest coarse cell = %0d units, coarse total = %0d units", wmax, total);
    chk(wmax == 13, "largest cell holds 13 unit currents");
    coarse_on = '0;
    fine_on = '0; fine_on[0] = 7'h7F; #1;
    chk(int'(units) - base == 11, "first fine DAC holds 11 units");
    fine_on = '0; fine_on[7] = 7'h7F; #1;
    chk(int'(units) - base == 1, "last fine DAC holds 1 unit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
