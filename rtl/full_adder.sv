// full_adder: one bit of the ripple carry adders.
//
// sum = a ^ b ^ cin, cout = majority(a, b, cin). Purely combinational. The adders of the
// synthesizer are cascades of this cell, the carry out of one bit wired straight to the carry
// in of the next, as the chip lays them out bit after bit.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  always_comb begin
    sum  = a ^ b ^ cin;
    cout = (a & b) | (a & cin) | (b & cin);
  end
endmodule
