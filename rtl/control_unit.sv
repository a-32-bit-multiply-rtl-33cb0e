// control_unit: sequences one multiply-accumulate job.
//
// IDLE: a start pulse clears the accumulator and latches num_ops, the
// number of operand pairs to accumulate (0 finishes at once).
// RUN: in_ready is high; each cycle with in_valid && in_ready loads one pair
// into the input registers (load). A cycle with in_valid low is a bubble and
// the job simply waits. After the last pair is taken the unit goes to DRAIN.
// DRAIN: waits until the last pair has left the input registers and been
// added, then pulses done for one cycle and returns to IDLE.
// acc_en is the input registers' valid bit passed straight through, so every
// loaded pair is accumulated exactly one cycle after it is taken. Throughput is one pair per
// cycle; done rises two cycles after the last pair is taken, and the
// accumulator already holds the final value in that cycle.
// The control unit's task (coordinating multiplier, adder and accumulator and
// releasing the result after the required number of operations) follows the
// architecture; this interface, the FSM and the counter width are this
// design's choices.
module control_unit
  import mac_pkg::*;
#(
  parameter int CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [CNT_W-1:0] num_ops,
  input  logic             in_valid,
  input  logic             stage_valid,
  output logic             in_ready,
  output logic             load,
  output logic             acc_clr,
  output logic             acc_en,
  output logic             busy,
  output logic             done
);
  mac_state_e       state;
  logic [CNT_W-1:0] remaining;

  assign in_ready = (state == ST_RUN);
  assign load     = in_valid && in_ready;
  assign acc_clr  = (state == ST_IDLE) && start;
  assign acc_en   = stage_valid;
  assign busy     = (state != ST_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ST_IDLE;
      remaining <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        ST_IDLE: if (start) begin
          remaining <= num_ops;
          state     <= (num_ops == '0) ? ST_DRAIN : ST_RUN;
        end
        ST_RUN: if (load) begin
          remaining <= remaining - 1'b1;
          if (remaining == 1) state <= ST_DRAIN;
        end
        ST_DRAIN: if (!stage_valid) begin
          done  <= 1'b1;
          state <= ST_IDLE;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  // A pair is only ever taken while some remain to be taken.
  assert property (@(posedge clk) disable iff (!rst_n) load |-> remaining != '0);
  // The accumulator is never cleared while a pair is in flight.
  assert property (@(posedge clk) disable iff (!rst_n) acc_clr |-> !stage_valid);
endmodule
