// accumulator: running-sum register of the MAC with a sticky overflow flag.
//
// Each enabled clock edge stores the low ACC_W bits of the carry save
// adder's result (sum_in is ACC_W+1 bits, cout_in is the bit above). If
// either upper bit is set the true sum no longer fits in ACC_W bits, and
// overflow is set and stays set until clr; the stored value wraps modulo
// 2^ACC_W. clr (priority over en) zeroes the sum and the flag. The stored
// value is fed back to the adder as its third operand.
// Timing: acc and overflow change one edge after en or clr.
// Holding the running sum and feeding it back follows the architecture; the
// 64-bit width, the wrap-plus-flag overflow policy and the reset are this
// design's choices.
module accumulator #(
  parameter int ACC_W = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             en,
  input  logic [ACC_W:0]   sum_in,
  input  logic             cout_in,
  output logic [ACC_W-1:0] acc,
  output logic             overflow
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc      <= '0;
      overflow <= 1'b0;
    end else if (clr) begin
      acc      <= '0;
      overflow <= 1'b0;
    end else if (en) begin
      acc      <= sum_in[ACC_W-1:0];
      overflow <= overflow | sum_in[ACC_W] | cout_in;
    end
  end
endmodule
