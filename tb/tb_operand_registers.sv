// tb_operand_registers: drives random operands and load strobes and checks,
// after every clock edge, that the registers hold the last loaded pair and
// that valid_q equals the previous cycle's load. Also checks the reset values.
module tb_operand_registers;
  logic        clk = 1'b0, rst_n = 1'b1, load = 1'b0;
  logic [31:0] a_in = '0, b_in = '0, a_q, b_q;
  logic        valid_q;
  logic [31:0] exp_a = '0, exp_b = '0;
  logic        exp_v = 1'b0;
  int checks = 0, failures = 0;

  operand_registers dut (.clk, .rst_n, .load, .a_in, .b_in, .a_q, .b_q, .valid_q);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;   // a falling edge fires the asynchronous reset
    #1;
    checks++;
    if (a_q != '0 || b_q != '0 || valid_q) begin
      failures++;
      $display("FAIL reset values");
    end
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      load = ($urandom % 3) != 0;
      a_in = $urandom;
      b_in = $urandom;
      if (load) begin exp_a = a_in; exp_b = b_in; end
      exp_v = load;
      @(negedge clk);
      checks++;
      if (a_q != exp_a || b_q != exp_b || valid_q != exp_v) begin
        failures++;
        $display("FAIL cycle %0d: got %h %h %b, expected %h %h %b",
                 i, a_q, b_q, valid_q, exp_a, exp_b, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
