// Self-checking testbench for feynman_gate. Applies all four input
// combinations, compares p and q with a = p, a ^ b worked out here, and
// checks that the gate is reversible: the four outputs are all different.
module tb_feynman_gate;
  logic a, b, p, q;
  int   checks = 0, failures = 0;
  logic [3:0] seen = '0;

  feynman_gate dut (.a(a), .b(b), .p(p), .q(q));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if (p !== a || q !== ((a == b) ? 1'b0 : 1'b1)) begin
        failures++;
        $display("FAIL a=%b b=%b -> p=%b q=%b", a, b, p, q);
      end
      checks++;
      if (seen[{p, q}]) begin
        failures++;
        $display("FAIL output %b%b repeated: not reversible", p, q);
      end
      seen[{p, q}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
