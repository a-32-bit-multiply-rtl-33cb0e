// tb_accumulator: drives random clear/enable strobes and random adder results
// into the accumulator and compares acc and the sticky overflow flag with a
// reference model after every clock edge. About one result in four has one
// of its two upper bits set, so the flag is set and then cleared many times.
module tb_accumulator;
  logic        clk = 1'b0, rst_n = 1'b1, clr = 1'b0, en = 1'b0;
  logic [64:0] sum_in = '0;
  logic        cout_in = 1'b0;
  logic [63:0] acc, exp_acc = '0;
  logic        overflow, exp_ovf = 1'b0;
  int checks = 0, failures = 0, ovf_seen = 0;

  accumulator dut (.clk, .rst_n, .clr, .en, .sum_in, .cout_in, .acc, .overflow);

  always #5 clk = ~clk;
  // a falling edge on rst_n fires the asynchronous reset
  initial #1 rst_n = 1'b0;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      clr     = ($urandom % 10) == 0;
      en      = ($urandom % 4) != 0;
      sum_in  = {1'b0, $urandom, $urandom};
      cout_in = 1'b0;
      case ($urandom % 8)
        0: sum_in[64] = 1'b1;
        1: cout_in = 1'b1;
        default: ;
      endcase
      if (clr) begin
        exp_acc = '0; exp_ovf = 1'b0;
      end else if (en) begin
        exp_acc = sum_in[63:0];
        exp_ovf = exp_ovf | sum_in[64] | cout_in;
      end
      @(negedge clk);
      checks++;
      if (overflow) ovf_seen++;
      if (acc != exp_acc || overflow != exp_ovf) begin
        failures++;
        $display("FAIL cycle %0d: acc=%h ovf=%b, expected %h %b", i, acc, overflow, exp_acc, exp_ovf);
      end
    end
    checks++;
    if (ovf_seen == 0) begin
      failures++;
      $display("FAIL overflow never set");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
