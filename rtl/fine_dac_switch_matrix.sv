// fine_dac_switch_matrix: selection and thermometer switching of the eight 3-bit fine DACs.
//
// Each row of the fine array is one fine DAC of 8 cell positions, 7 of them switched. The
// three highest core bits (<7:9>, the same bits that pick the coarse row) drive a 3-7 row
// decoder whose thermometer lines are turned into a one-of-eight selection, so only the fine
// DAC belonging to the current coarse region conducts. The three lowest core bits (<1:3>) drive
// a 3-7 column decoder that turns on the first f cells of the selected row. The fine DACs
// interpolate between two coarse levels.
//
// Interface: sel (3 bits, fine DAC select), code (3 bits, fine code), cell_on[r][j] (cell j of
// fine DAC r is on). Combinational.
module fine_dac_switch_matrix
  import dds_pkg::*;
(
  input  logic [2:0]                        sel,
  input  logic [FINE_W-1:0]                 code,
  output logic [N_FINE_DAC-1:0][N_FINE_CELL-2:0] cell_on
);
  logic [6:0] row_t;
  logic [6:0] col_t;
  logic [7:0] row_sel;

  therm_decoder #(.BITS(3)) u_row_dec (.bin(sel),  .therm(row_t));
  therm_decoder #(.BITS(3)) u_col_dec (.bin(code), .therm(col_t));

  // one-hot row select from the thermometer lines: row r is selected when sel >= r and not sel > r
  always_comb begin
    row_sel[0] = ~row_t[0];
    for (int r = 1; r < 7; r++) row_sel[r] = row_t[r-1] & ~row_t[r];
    row_sel[7] = row_t[6];
  end

  always_comb begin
    for (int r = 0; r < N_FINE_DAC; r++) begin
      for (int j = 0; j < N_FINE_CELL - 1; j++) begin
        cell_on[r][j] = row_sel[r] & col_t[j];
      end
    end
  end
endmodule
