// Self-checking testbench for rev_rca. Exhaustively adds every operand pair at
// three widths: 4 (the default), 5 and 8, the adder sizes the multipliers
// use or the reference mentions, and compares {cout, sum} with integer a + b.
module tb_rev_rca;
  logic [3:0] a4, b4, s4;
  logic [4:0] a5, b5, s5;
  logic [7:0] a8, b8, s8;
  logic       c4, c5, c8;
  int checks = 0, failures = 0;

  rev_rca dut4 (.a(a4), .b(b4), .sum(s4), .cout(c4));
  rev_rca #(.WIDTH(5)) dut5 (.a(a5), .b(b5), .sum(s5), .cout(c5));
  rev_rca #(.WIDTH(8)) dut8 (.a(a8), .b(b8), .sum(s8), .cout(c8));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i); b4 = 4'(j);
        #1;
        checks++;
        if ({c4, s4} !== 5'(i + j)) begin
          failures++;
          $display("FAIL 4-bit %0d + %0d -> %0d", i, j, {c4, s4});
        end
      end
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 32; j++) begin
        a5 = 5'(i); b5 = 5'(j);
        #1;
        checks++;
        if ({c5, s5} !== 6'(i + j)) begin
          failures++;
          $display("FAIL 5-bit %0d + %0d -> %0d", i, j, {c5, s5});
        end
      end
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i); b8 = 8'(j);
        #1;
        checks++;
        if ({c8, s8} !== 9'(i + j)) begin
          failures++;
          if (failures < 10) $display("FAIL 8-bit %0d + %0d -> %0d", i, j, {c8, s8});
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
