// tb_carry_save_adder: checks x + y + z for two instances of the three-operand
// adder. The 4-bit instance is tested exhaustively (all 4096 operand triples);
// the 64-bit instance, the width used in the MAC, gets corner values (all
// ones, which produces the carry-out, and zeros) and random triples. The
// reference is the sum computed in wider integer arithmetic.
module tb_carry_save_adder;
  int checks = 0, failures = 0;

  logic [3:0]  x4, y4, z4;
  logic [4:0]  s4;
  logic        c4;
  logic [63:0] x, y, z;
  logic [64:0] s;
  logic        c;

  carry_save_adder #(.W(4)) dut4 (.x(x4), .y(y4), .z(z4), .sum(s4), .cout(c4));
  carry_save_adder          dut  (.x, .y, .z, .sum(s), .cout(c));

  task automatic check64(logic [63:0] xv, logic [63:0] yv, logic [63:0] zv);
    logic [65:0] ref_sum;
    x = xv; y = yv; z = zv;
    #1;
    ref_sum = 66'(xv) + 66'(yv) + 66'(zv);
    checks++;
    if ({c, s} != ref_sum) begin
      failures++;
      $display("FAIL W=64 %h + %h + %h = %h, got %h", xv, yv, zv, ref_sum, {c, s});
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '0; y = '0; z = '0;
    for (int i = 0; i < 4096; i++) begin
      {x4, y4, z4} = 12'(i);
      #1;
      checks++;
      if ({c4, s4} != 6'(x4) + 6'(y4) + 6'(z4)) begin
        failures++;
        $display("FAIL W=4 %0d + %0d + %0d, got %0d", x4, y4, z4, {c4, s4});
      end
    end
    check64('1, '1, '1);
    check64('0, '0, '0);
    check64('1, 64'd1, '0);
    check64(64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000);
    for (int i = 0; i < 2000; i++)
      check64({$urandom, $urandom}, {$urandom, $urandom}, {$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
