// tb_fine_dac_switch_matrix: for every fine DAC select and fine code, checks that only the
// selected fine DAC has cells on, and exactly its first f cells.
module tb_fine_dac_switch_matrix;
  int checks = 0, failures = 0;
  logic [2:0] sel, code;
  logic [7:0][6:0] cell_on;

  fine_dac_switch_matrix dut (.sel(sel), .code(code), .cell_on(cell_on));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 8; s++) begin
      for (int f = 0; f < 8; f++) begin
        sel = 3'(s); code = 3'(f); #1;
        for (int r = 0; r < 8; r++) begin
          for (int j = 0; j < 7; j++) begin
            checks++;
            if (cell_on[r][j] != (r == s && j < f)) begin
              failures++;
              $display("FAIL sel=%0d code=%0d cell[%0d][%0d]=%0d", s, f, r, j, cell_on[r][j]);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
