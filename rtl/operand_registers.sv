// operand_registers: the MAC's input registers, first pipeline stage.
//
// On a rising clock edge with load high, a_in and b_in are stored in a_q and
// b_q and valid_q is set; with load low, valid_q clears and the operands keep
// their old values (they are then ignored downstream). The multiplier sees
// stable operands for a whole cycle, which cuts the path from the MAC's
// input pins to the accumulator. Asynchronous active-low reset clears all.
// Storing the operands in 32-bit input registers follows the architecture;
// the load enable, the valid bit and the reset are this design's choices.
module operand_registers #(
  parameter int N = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [N-1:0] a_in,
  input  logic [N-1:0] b_in,
  output logic [N-1:0] a_q,
  output logic [N-1:0] b_q,
  output logic         valid_q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q     <= '0;
      b_q     <= '0;
      valid_q <= 1'b0;
    end else begin
      valid_q <= load;
      if (load) begin
        a_q <= a_in;
        b_q <= b_in;
      end
    end
  end
endmodule
