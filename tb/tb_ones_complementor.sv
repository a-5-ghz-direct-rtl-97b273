// tb_ones_complementor: exhaustive check of the conditional 1's complement over all 512
// values and both settings of the second MSB.
module tb_ones_complementor;
  int checks = 0, failures = 0;
  logic [8:0] in, out;
  logic       inv;

  ones_complementor #(.WIDTH(9)) dut (.in(in), .invert(inv), .out(out));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      for (int q = 0; q < 2; q++) begin
        in = 9'(v); inv = 1'(q); #1;
        checks++;
        if (int'(out) != (q != 0 ? 511 - v : v)) begin
          failures++;
          $display("FAIL in=%0d inv=%0d out=%0d", v, q, out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
