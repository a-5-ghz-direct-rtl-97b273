// ones_complementor: conditional 1's complement of the quarter-wave phase.
//
// In the second and fourth quadrants of the sine the phase runs backwards over the quarter
// wave, so the second MSB of the DAC word inverts the nine remaining bits: out = ~in when
// invert is high, out = in otherwise. The quarter-wave DAC core then only ever sees a phase
// that rises from 0 to pi/2 or falls back from pi/2 to 0. Combinational.
//
// Interface: in (WIDTH bits), invert (the second MSB), out (WIDTH bits).
module ones_complementor #(
  parameter int WIDTH = 9
) (
  input  logic [WIDTH-1:0] in,
  input  logic             invert,
  output logic [WIDTH-1:0] out
);
  always_comb out = in ^ {WIDTH{invert}};
endmodule
