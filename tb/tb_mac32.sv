// tb_mac32: end-to-end test of the 32-bit MAC at its default parameters.
// Runs jobs of multiply-accumulate operations and compares acc and the
// overflow flag with the sum of products computed in 128-bit arithmetic.
// It checks the timing too: with no bubbles a job of n pairs is taken in n
// consecutive cycles (one operation per clock), and done rises exactly two
// cycles after the last pair is taken. It counts how often each mechanism
// happened and fails if one never did: bubbles (in_valid low mid-job),
// stalls (a pair offered while the unit is not ready), overflow, empty jobs,
// multi-operation accumulation and back-to-back jobs.
module tb_mac32;
  logic        clk = 1'b0, rst_n = 1'b1;
  logic        start = 1'b0, in_valid = 1'b0;
  logic [15:0] num_ops = '0;
  logic [31:0] a = '0, b = '0;
  logic        in_ready, overflow, busy, done;
  logic [63:0] acc;
  int checks = 0, failures = 0;
  int cyc = 0;
  int n_bubble = 0, n_stall = 0, n_ovf = 0, n_empty = 0, n_multi = 0, n_b2b = 0;

  mac32 dut (.clk, .rst_n, .start, .num_ops, .in_valid, .in_ready, .a, .b,
             .acc, .overflow, .busy, .done);

  always #5 clk = ~clk;
  // a falling edge on rst_n fires the asynchronous reset
  initial #1 rst_n = 1'b0;
  always_ff @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL cycle %0d: %s", cyc, what);
    end
  endtask

  // kind: 0 random, 1 all ones, 2 small values
  function automatic logic [31:0] operand(int kind);
    case (kind)
      1:       return '1;
      2:       return 32'($urandom % 16);
      default: return $urandom;
    endcase
  endfunction

  task automatic job(int n, int bubble_pct, int kind, bit stall_in_drain);
    logic [127:0] ref_sum = '0;
    int taken = 0, first_take = -1, last_take = -1, start_cyc;
    @(negedge clk);
    if (stall_in_drain) begin
      // the previous job just finished: offer a pair before start
      in_valid = 1'b1; a = operand(kind); b = operand(kind);
      #1;
      if (!in_ready) n_stall++;
      check(!in_ready, "not ready while idle");
      @(negedge clk);
    end
    start = 1'b1; num_ops = 16'(n); in_valid = 1'b0;
    start_cyc = cyc + 1;   // start is seen on the coming edge
    @(negedge clk);
    start = 1'b0;
    while (taken < n) begin
      in_valid = ($urandom % 100) >= bubble_pct;
      a = operand(kind);
      b = operand(kind);
      #1;
      if (!in_valid) n_bubble++;
      if (in_valid && in_ready) begin
        ref_sum += 128'(a) * 128'(b);
        if (first_take < 0) first_take = cyc + 1;
        last_take = cyc + 1;   // the pair is taken on the coming edge
        taken++;
      end
      @(negedge clk);
      if (cyc - start_cyc > 20 * n + 50) break;
    end
    // keep offering while the job drains: the unit must not take these
    in_valid = stall_in_drain;
    while (!done && cyc - start_cyc < 20 * n + 50) begin
      #1;
      if (in_valid) begin
        check(!in_ready, "not ready while draining");
        n_stall++;
      end
      @(negedge clk);
    end
    in_valid = 1'b0;
    check(done, "done arrives");
    check(taken == n, $sformatf("took %0d of %0d pairs", taken, n));
    check(acc == ref_sum[63:0], $sformatf("acc %h, expected %h", acc, ref_sum[63:0]));
    check(overflow == (ref_sum[127:64] != '0),
          $sformatf("overflow %b for sum %h", overflow, ref_sum));
    if (n > 0) begin
      check(cyc - last_take == 2, $sformatf("done %0d cycles after last pair", cyc - last_take));
      if (bubble_pct == 0)
        check(last_take - first_take == n - 1, "one pair per cycle without bubbles");
    end else begin
      check(cyc - start_cyc == 1, "empty job done one cycle after start");
      n_empty++;
    end
    if (overflow) n_ovf++;
    if (n > 1) n_multi++;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    job(1, 0, 0, 1'b0);
    job(16, 0, 0, 1'b0);
    job(0, 0, 0, 1'b0);
    job(3, 0, 1, 1'b0);        // (2^32-1)^2 three times: overflows 64 bits
    job(5, 0, 2, 1'b1);        // small values right after an overflowed job
    job(40, 35, 0, 1'b1);
    for (int i = 0; i < 30; i++) begin
      job(int'($urandom % 24), int'($urandom % 50), int'($urandom % 3), 1'(i % 2));
      n_b2b++;
    end
    check(n_bubble > 0, "bubble mechanism exercised");
    check(n_stall > 0, "stall mechanism exercised");
    check(n_ovf > 0, "overflow mechanism exercised");
    check(n_empty > 0, "empty job exercised");
    check(n_multi > 0, "multi-operation accumulation exercised");
    check(n_b2b > 0, "back-to-back jobs exercised");
    $display("mechanisms: bubbles=%0d stalls=%0d overflows=%0d empty=%0d multi=%0d back_to_back=%0d",
             n_bubble, n_stall, n_ovf, n_empty, n_multi, n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
