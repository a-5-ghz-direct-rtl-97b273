// tb_coarse_dac_switch_matrix: for all 64 coarse codes c, checks that exactly cells 0..c-1
// of the 8 x 8 matrix (63 switched positions) are on.
module tb_coarse_dac_switch_matrix;
  int checks = 0, failures = 0;
  logic [5:0]  code;
  logic [62:0] cell_on;

  coarse_dac_switch_matrix dut (.code(code), .cell_on(cell_on));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 64; c++) begin
      code = 6'(c); #1;
      for (int k = 0; k < 63; k++) begin
        checks++;
        if (cell_on[k] != (k < c)) begin
          failures++;
          $display("FAIL code=%0d cell %0d = %0d", c, k, cell_on[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
