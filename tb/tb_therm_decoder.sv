// tb_therm_decoder: exhaustive check of the 3-7 thermometer decoder: code n turns on exactly
// the n lowest outputs.
module tb_therm_decoder;
  int checks = 0, failures = 0;
  logic [2:0] bin;
  logic [6:0] therm;

  therm_decoder #(.BITS(3)) dut (.bin(bin), .therm(therm));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 8; n++) begin
      bin = 3'(n); #1;
      checks++;
      if (therm != 7'((1 << n) - 1)) begin
        failures++;
        $display("FAIL n=%0d therm=%b", n, therm);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
