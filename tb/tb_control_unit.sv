// tb_control_unit: runs jobs of several lengths through the control unit,
// with the input registers' valid bit modelled as load delayed by one clock.
// For each job it checks: acc_clr pulses once, on the start cycle; exactly
// num_ops pairs are taken and accumulated; a pair is taken on every cycle
// that offers one in RUN (one per cycle); nothing is taken while idle or
// draining; done pulses once, two cycles after the last pair (one cycle after
// start for an empty job); busy covers the job.
module tb_control_unit;
  logic        clk = 1'b0, rst_n = 1'b1;
  logic        start = 1'b0, in_valid = 1'b0, stage_valid = 1'b0;
  logic [15:0] num_ops = '0;
  logic        in_ready, load, acc_clr, acc_en, busy, done;
  int checks = 0, failures = 0;
  int cyc = 0;

  control_unit dut (.clk, .rst_n, .start, .num_ops, .in_valid, .stage_valid,
                    .in_ready, .load, .acc_clr, .acc_en, .busy, .done);

  always #5 clk = ~clk;
  // a falling edge on rst_n fires the asynchronous reset
  initial #1 rst_n = 1'b0;
  always_ff @(posedge clk) begin
    stage_valid <= load;
    cyc         <= cyc + 1;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL cycle %0d: %s", cyc, what);
    end
  endtask

  // One job; signals are driven after each falling edge and judged there.
  task automatic job(int n, int bubble_pct);
    int taken = 0, accd = 0, clrs = 0, last_take = -1, start_cyc;
    check(!busy && !in_ready, "idle before job");
    // an offered pair while idle must not be taken
    in_valid = 1'b1;
    #0 check(!load, "no load while idle");
    start = 1'b1; num_ops = 16'(n);
    start_cyc = cyc + 1;   // start is seen on the coming edge
    #1 check(acc_clr, "acc_clr on start");
    @(negedge clk);
    start = 1'b0; in_valid = 1'b0;
    while (!done) begin
      check(!acc_clr, "no acc_clr during job");
      check(busy, "busy during job");
      if (acc_en) accd++;
      in_valid = (($urandom % 100) >= bubble_pct) || (taken + 1 == n);
      #1;
      if (in_valid && in_ready) begin
        check(load, "load when offered and ready");
        taken++;
        last_take = cyc + 1;   // the pair is taken on the coming edge
      end else begin
        check(!load, "no load without handshake");
      end
      if (taken >= n) check(!in_ready || (in_valid && load), "ready only while pairs remain");
      @(negedge clk);
      in_valid = 1'b0;
      if (cyc - start_cyc > 10 * n + 20) break;
    end
    check(done, "done arrives");
    check(taken == n, $sformatf("took %0d of %0d pairs", taken, n));
    check(accd == n, $sformatf("accumulated %0d of %0d pairs", accd, n));
    if (n > 0) check(cyc - last_take == 2, $sformatf("done %0d cycles after last pair", cyc - last_take));
    else       check(cyc - start_cyc == 1, "empty job done one cycle after start");
    @(negedge clk);
    check(!done && !busy, "done is one pulse, then idle");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk) rst_n = 1'b1;
    @(negedge clk);
    job(1, 0);
    job(8, 0);
    job(0, 0);
    job(20, 40);
    for (int i = 0; i < 20; i++) job(int'($urandom % 12), 30);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
