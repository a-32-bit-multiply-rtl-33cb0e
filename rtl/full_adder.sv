// full_adder: one-bit full adder made of two half adders and an OR gate.
//
// The first half adder adds a and b; the second adds that partial sum and
// the carry-in, giving the final sum bit. The carry-out is the OR of the two
// half adders' carries (they can never both be 1). This is the cell of both
// rows of the carry save adder and of the multiplier's reduction tree.
// Purely combinational, no clock.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  logic s1, c1, c2;

  half_adder u_ha1 (.a(a),  .b(b),   .sum(s1),  .carry(c1));
  half_adder u_ha2 (.a(s1), .b(cin), .sum(sum), .carry(c2));

  assign cout = c1 | c2;
endmodule
