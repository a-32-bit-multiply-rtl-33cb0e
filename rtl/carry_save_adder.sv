// carry_save_adder: three-operand adder, sum = x + y + z.
//
// Row 1 (carry-save row) has one full adder per bit position i that adds
// x[i], y[i] and z[i] into a save bit s[i] (weight 2^i) and a carry bit c[i]
// (weight 2^(i+1)). No carry travels along this row, so its delay does not
// grow with W.
// Row 2 (carry-propagate row) adds the two vectors: bit 0 of the result is
// s[0]; position i = 1..W-1 adds s[i], c[i-1] and the ripple carry; position
// W adds c[W-1], a constant 0 and the ripple carry. The result is W+1 sum
// bits plus a carry-out (bit W+1), so x + y + z never loses a bit.
// The two rows of full adders, the constant 0 on the top position's adder
// and the carry-out follow the reference 4-bit carry save adder; widening it
// to the parameter W (64 in the MAC) is this design's choice.
// Purely combinational.
module carry_save_adder #(
  parameter int W = 64
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W:0]   sum,
  output logic         cout
);
  logic [W-1:0] s;      // save bits of row 1
  logic [W-1:0] c;      // carry bits of row 1, c[i] has weight 2^(i+1)
  logic [W:1]   rc;     // ripple carries of row 2, rc[i] enters position i

  // Row 1: W full adders working in parallel.
  for (genvar i = 0; i < W; i++) begin : g_save
    full_adder u_fa (.a(x[i]), .b(y[i]), .cin(z[i]), .sum(s[i]), .cout(c[i]));
  end

  // Row 2: ripple-carry addition of s and c << 1.
  assign sum[0] = s[0];
  assign rc[1]  = 1'b0;
  for (genvar i = 1; i < W; i++) begin : g_prop
    full_adder u_fa (.a(s[i]), .b(c[i-1]), .cin(rc[i]), .sum(sum[i]), .cout(rc[i+1]));
  end
  full_adder u_fa_top (.a(c[W-1]), .b(1'b0), .cin(rc[W]), .sum(sum[W]), .cout(cout));

endmodule
