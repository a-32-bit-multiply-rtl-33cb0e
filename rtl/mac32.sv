// mac32: 32-bit multiply-accumulate unit built from a Dadda multiplier and a
// carry save adder.
//
// It computes acc = sum over a job of a(k) * b(k) for unsigned N-bit operands.
// Two pipeline stages:
//   1. operand_registers capture a and b when a pair is taken.
//   2. dadda_multiplier turns the registered pair into two 2N-bit rows whose
//      sum is the product; carry_save_adder adds those two rows and the
//      current accumulator value in one carry-save row plus one ripple row;
//      accumulator stores the result on the next edge and feeds it back.
// Folding the product's final addition and the accumulation into one
// three-operand adder means the product is never formed on its own: there is
// one carry-propagate addition per operation instead of two.
// control_unit runs a job: start (with num_ops) clears the accumulator; pairs
// are taken with an in_valid/in_ready handshake, one per cycle at most; done
// pulses for one cycle when the last product is in acc. overflow is sticky for
// the job and marks a sum that wrapped past ACC_W bits.
// Latency: done rises two cycles after the last pair is taken.
// The block split (input registers, Dadda multiplier, CSA, accumulator,
// control unit) and the feedback of the accumulator into the adder follow the
// architecture; the handshake, pipeline depth, ACC_W = 64 and the overflow
// policy are this design's choices.
module mac32 #(
  parameter int N     = 32,
  parameter int ACC_W = 2 * N,
  parameter int CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [CNT_W-1:0] num_ops,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [N-1:0]     a,
  input  logic [N-1:0]     b,
  output logic [ACC_W-1:0] acc,
  output logic             overflow,
  output logic             busy,
  output logic             done
);
  logic             load, acc_clr, acc_en, stage_valid;
  logic [N-1:0]     a_q, b_q;
  logic [2*N-1:0]   row0, row1;
  logic [ACC_W-1:0] row0_ext, row1_ext;
  logic [ACC_W:0]   csa_sum;
  logic             csa_cout;

  if (ACC_W < 2 * N) begin : g_bad_acc
    $error("mac32: ACC_W must hold a full product (ACC_W >= 2*N)");
  end

  control_unit #(.CNT_W(CNT_W)) u_ctrl (
    .clk, .rst_n, .start, .num_ops, .in_valid, .stage_valid,
    .in_ready, .load, .acc_clr, .acc_en, .busy, .done
  );

  operand_registers #(.N(N)) u_in_regs (
    .clk, .rst_n, .load, .a_in(a), .b_in(b), .a_q, .b_q, .valid_q(stage_valid)
  );

  dadda_multiplier #(.N(N)) u_mult (.a(a_q), .b(b_q), .row0, .row1);

  assign row0_ext = ACC_W'(row0);
  assign row1_ext = ACC_W'(row1);

  carry_save_adder #(.W(ACC_W)) u_csa (
    .x(row0_ext), .y(row1_ext), .z(acc), .sum(csa_sum), .cout(csa_cout)
  );

  accumulator #(.ACC_W(ACC_W)) u_acc (
    .clk, .rst_n, .clr(acc_clr), .en(acc_en),
    .sum_in(csa_sum), .cout_in(csa_cout), .acc, .overflow
  );
endmodule
