// ripple_carry_adder: WIDTH-bit adder made of a cascade of 1-bit full adders.
//
// Bit i takes its carry in from the carry out of bit i-1; bit 0 takes cin. The carry chain
// is the critical path (WIDTH carry delays), which the chip accepts in exchange for a compact
// bit-after-bit layout without long wires. Unlike a pipelined accumulator adder it gives the
// full sum of any operands in one combinational pass, which is what allows the frequency and
// phase words to change every clock.
//
// Interface: a, b (WIDTH bits), cin; sum (WIDTH bits) and cout. Combinational, no clock.
// The default width is the 24 bits of the phase accumulator; the phase modulator uses 12.
module ripple_carry_adder #(
  parameter int WIDTH = 24
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH:0] carry;

  assign carry[0] = cin;
  assign cout     = carry[WIDTH];

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (carry[i]),
      .sum (sum[i]),
      .cout(carry[i+1])
    );
  end
endmodule
