// Self-checking testbench for half_adder_assembly: every 4-bit x with every
// allowed increment 0, 1 and 2, y compared with (x + inc) mod 16. Also runs
// a 6-bit instance over its whole input range.
module tb_half_adder_assembly;
  logic [3:0] x4, y4;
  logic [5:0] x6, y6;
  logic [1:0] inc4, inc6;
  int checks = 0, failures = 0;

  half_adder_assembly dut4 (.x(x4), .inc(inc4), .y(y4));
  half_adder_assembly #(.WIDTH(6)) dut6 (.x(x6), .inc(inc6), .y(y6));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int k = 0; k < 3; k++) begin
        x4 = 4'(i); inc4 = 2'(k);
        #1;
        checks++;
        if (y4 !== 4'((i + k) % 16)) begin
          failures++;
          $display("FAIL 4-bit %0d + %0d -> %0d", i, k, y4);
        end
      end
    for (int i = 0; i < 64; i++)
      for (int k = 0; k < 3; k++) begin
        x6 = 6'(i); inc6 = 2'(k);
        #1;
        checks++;
        if (y6 !== 6'((i + k) % 64)) begin
          failures++;
          $display("FAIL 6-bit %0d + %0d -> %0d", i, k, y6);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
