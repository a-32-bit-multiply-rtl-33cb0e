// half_adder: one-bit half adder.
//
// Adds two bits and returns their sum bit and carry bit: sum is the XOR of
// the inputs, carry is their AND. It is the smallest cell of the multiplier's
// partial-product reduction, used where a column needs to lose exactly one
// bit. Purely combinational, no clock.
//
// The XOR/AND structure and the truth table are the standard half adder;
// the port names are this design's choice.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  assign sum   = a ^ b;
  assign carry = a & b;
endmodule
