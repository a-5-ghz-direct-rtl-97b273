// phase_accumulator: 24-bit phase accumulator of the synthesizer.
//
// A 24-bit ripple carry adder adds the frequency control word to the phase held in a bank of
// flip-flops, and the sum is loaded back every clock: phase(n+1) = phase(n) + fcw(n) mod 2^24.
// The FCW is not registered, so a new word takes effect on the very next clock edge; this is
// the direct frequency modulation the design exists for. The output frequency is
// fcw / 2^24 * f_clk.
//
// Interface: clk, rst (synchronous, active high, clears the phase; the reset behaviour is this
// design's choice), fcw (24 bits), phase (24-bit register output), wrap (the adder's carry
// out, high in the cycle whose addition overflows the phase; it is an extra observation
// output of this design).
module phase_accumulator
  import dds_pkg::*;
#(
  parameter int WIDTH = PHASE_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] fcw,
  output logic [WIDTH-1:0] phase,
  output logic             wrap
);
  logic [WIDTH-1:0] phase_next;

  ripple_carry_adder #(.WIDTH(WIDTH)) u_rca (
    .a   (phase),
    .b   (fcw),
    .cin (1'b0),
    .sum (phase_next),
    .cout(wrap)
  );

  always_ff @(posedge clk) begin
    if (rst) phase <= '0;
    else     phase <= phase_next;
  end
endmodule
