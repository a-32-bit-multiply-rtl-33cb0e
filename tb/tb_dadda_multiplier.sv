// tb_dadda_multiplier: checks that the two rows of the Dadda multiplier add
// up to the product. The 8-bit instance is tested exhaustively (65536 operand
// pairs); the 32-bit instance gets corner operands (zero, one, all ones,
// single bits) and random pairs. The reference product is computed with the
// simulator's own multiplication.
module tb_dadda_multiplier;
  int checks = 0, failures = 0;

  logic [7:0]  a8, b8;
  logic [15:0] r0_8, r1_8;
  logic [31:0] a, b;
  logic [63:0] r0, r1;

  dadda_multiplier #(.N(8)) dut8 (.a(a8), .b(b8), .row0(r0_8), .row1(r1_8));
  dadda_multiplier          dut  (.a, .b, .row0(r0), .row1(r1));

  task automatic check32(logic [31:0] av, logic [31:0] bv);
    logic [63:0] prod;
    a = av; b = bv;
    #1;
    prod = 64'(av) * 64'(bv);
    checks++;
    if (r0 + r1 != prod) begin
      failures++;
      $display("FAIL N=32 %h * %h = %h, rows add to %h", av, bv, prod, r0 + r1);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0;
    for (int i = 0; i < 65536; i++) begin
      {a8, b8} = 16'(i);
      #1;
      checks++;
      if (16'(r0_8 + r1_8) != 16'(a8) * 16'(b8)) begin
        failures++;
        $display("FAIL N=8 %0d * %0d, rows add to %0d", a8, b8, 16'(r0_8 + r1_8));
      end
    end
    check32('0, '0);
    check32('1, '1);
    check32('1, 32'd1);
    check32(32'd1, '1);
    check32('1, '0);
    for (int i = 0; i < 32; i++) check32(32'd1 << i, '1);
    for (int i = 0; i < 5000; i++) check32($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
