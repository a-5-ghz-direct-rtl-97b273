// current_source_array: the sine-weighted unit-current cells of the DAC, summed.
//
// On the chip each cell is a group of identical unit current sources (26 uA each, up to 13 per
// cell) whose number follows the slope of the sine, and the enabled cells' currents add on the
// output load. Here that sum is represented digitally as the number of conducting unit
// currents, which is an exact model of an ideal current-steering array; device mismatch, the
// split of every source into four parts and their random placement are layout matters and are
// not modelled. The cell weights come from dds_pkg (coarse: S(8k+8) - S(8k) plus an always-on
// base cell of S(0); fine: interpolation of each coarse region's slope).
//
// The MSB mirrors the quarter/half-wave about the pi point. The output is a 10-bit offset
// binary code, this design's choice of representation:
//   msb = 0: code = 512 + A      msb = 1: code = 511 - A
// where A (0..511) is the number of unit currents on.
//
// Interface: coarse_on (63 bits), fine_on (8 x 7 bits), msb; units (A, 9 bits) and
// dac_code (10 bits). Combinational. An immediate assertion checks that the sum stays
// within 9 bits.
module current_source_array
  import dds_pkg::*;
(
  input  logic [N_COARSE-2:0]                     coarse_on,
  input  logic [N_FINE_DAC-1:0][N_FINE_CELL-2:0]  fine_on,
  input  logic                                    msb,
  output logic [CORE_W-1:0]                       units,
  output logic [AMP_W-1:0]                        dac_code
);
  localparam int BASE = coarse_base_weight();

  logic [3:0] coarse_units [N_COARSE-1];
  logic [3:0] fine_units   [N_FINE_DAC][N_FINE_CELL-1];

  for (genvar k = 0; k < N_COARSE - 1; k++) begin : g_coarse
    localparam int W = coarse_weight(k);
    assign coarse_units[k] = coarse_on[k] ? 4'(W) : 4'd0;
  end

  for (genvar r = 0; r < N_FINE_DAC; r++) begin : g_fine_dac
    for (genvar j = 0; j < N_FINE_CELL - 1; j++) begin : g_cell
      localparam int W = fine_weight(r, j);
      assign fine_units[r][j] = fine_on[r][j] ? 4'(W) : 4'd0;
    end
  end

  logic [CORE_W:0] total;  // one spare bit; the weights keep the sum at or below 511

  always_comb begin
    total = (CORE_W+1)'(BASE);
    for (int k = 0; k < N_COARSE - 1; k++) total = total + (CORE_W+1)'(coarse_units[k]);
    for (int r = 0; r < N_FINE_DAC; r++) begin
      for (int j = 0; j < N_FINE_CELL - 1; j++) total = total + (CORE_W+1)'(fine_units[r][j]);
    end
  end

  // the weights are chosen so that the quarter-wave sum never exceeds 9 bits
  always_comb begin
    assert (total <= (CORE_W+1)'(511))
      else $error("current_source_array: %0d unit currents exceed the 9-bit range", total);
  end

  assign units    = total[CORE_W-1:0];
  assign dac_code = msb ? (AMP_W'(511) - AMP_W'(units)) : (AMP_W'(512) + AMP_W'(units));
endmodule
