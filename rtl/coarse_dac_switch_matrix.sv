// coarse_dac_switch_matrix: thermometer switching of the 6-bit coarse sine-weighted DAC.
//
// The coarse current cells sit in an 8 x 8 matrix, cell k = 8*row + column. A 6-bit coarse
// code c must turn on cells 0..c-1. The top three code bits (phase bits <7:9> of the DAC core)
// go through a 3-7 row decoder, the next three (<4:6>) through a 3-7 column decoder, and each
// cell combines the two: a cell is on when its row lies wholly below the coded row, or when it
// lies in the coded row and its column lies below the coded column. Position 63 is never
// switched; in this design it holds the always-on base cell of the array (see
// current_source_array). The row and column decoder assignment follows the chip; the per-cell
// logic is the usual two-dimensional thermometer rule.
//
// Interface: code (6 bits), cell_on (63 bits, bit k enables coarse cell k). Combinational.
module coarse_dac_switch_matrix
  import dds_pkg::*;
(
  input  logic [COARSE_W-1:0]   code,
  output logic [N_COARSE-2:0]   cell_on
);
  logic [6:0] row_t;   // row_t[i] = (row > i)
  logic [6:0] col_t;   // col_t[j] = (col > j)

  therm_decoder #(.BITS(3)) u_row_dec (.bin(code[5:3]), .therm(row_t));
  therm_decoder #(.BITS(3)) u_col_dec (.bin(code[2:0]), .therm(col_t));

  for (genvar i = 0; i < 8; i++) begin : g_row
    // row above: every cell of row i is on; this row: the row is the coded one
    logic row_below;
    logic row_here;
    if (i < 7) begin : g_below
      assign row_below = row_t[i];
    end else begin : g_top
      assign row_below = 1'b0;
    end
    if (i == 0) begin : g_here0
      assign row_here = ~row_t[0];
    end else if (i < 7) begin : g_heren
      assign row_here = row_t[i-1] & ~row_t[i];
    end else begin : g_here7
      assign row_here = row_t[6];
    end
    for (genvar j = 0; j < 8; j++) begin : g_col
      if (8 * i + j < N_COARSE - 1) begin : g_cell
        if (j < 7) begin : g_sw
          assign cell_on[8*i+j] = row_below | (row_here & col_t[j]);
        end else begin : g_last
          assign cell_on[8*i+j] = row_below;
        end
      end
    end
  end
endmodule
