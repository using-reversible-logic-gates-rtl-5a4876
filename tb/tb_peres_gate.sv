// Self-checking testbench for peres_gate. Applies all eight inputs, compares
// the outputs with p = a, q = a xor b, r = (a and b) xor c computed here with
// if/else logic, and checks the mapping is a permutation (reversible).
module tb_peres_gate;
  logic a, b, c, p, q, r;
  logic ep, eq, er;
  int   checks = 0, failures = 0;
  logic [7:0] seen = '0;

  peres_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      ep = a;
      eq = (a == b) ? 1'b0 : 1'b1;
      er = (a && b) ? !c : c;
      checks++;
      if ({p, q, r} !== {ep, eq, er}) begin
        failures++;
        $display("FAIL abc=%b%b%b -> pqr=%b%b%b expected %b%b%b",
                 a, b, c, p, q, r, ep, eq, er);
      end
      checks++;
      if (seen[{p, q, r}]) begin
        failures++;
        $display("FAIL output %b%b%b repeated: not reversible", p, q, r);
      end
      seen[{p, q, r}] = 1'b1;
    end
    // Half-adder use: c = 0 gives sum on q and carry on r.
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      c = 1'b0;
      #1;
      checks++;
      if ({r, q} !== 2'(int'(a) + int'(b))) begin
        failures++;
        $display("FAIL half adder %b+%b -> carry=%b sum=%b", a, b, r, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
