// Self-checking testbench for carry_merge: all four carry combinations,
// cnt compared with the integer sum c1 + c2 (including both carries set,
// the case a plain OR would get wrong).
module tb_carry_merge;
  logic       c1, c2;
  logic [1:0] cnt;
  int checks = 0, failures = 0;

  carry_merge dut (.c1(c1), .c2(c2), .cnt(cnt));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {c1, c2} = 2'(v);
      #1;
      checks++;
      if (cnt !== 2'(int'(c1) + int'(c2))) begin
        failures++;
        $display("FAIL %b + %b -> %0d", c1, c2, cnt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
