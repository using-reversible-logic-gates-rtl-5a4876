// Self-checking testbench for hng_gate. Applies all sixteen inputs, compares
// with the HNG equations computed here, checks the mapping is a permutation
// (reversible), and checks that with d = 0 the gate is a full adder:
// {s, r} = a + b + c.
module tb_hng_gate;
  logic a, b, c, d, p, q, r, s;
  logic er, es;
  int   checks = 0, failures = 0;
  logic [15:0] seen = '0;

  hng_gate dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = 4'(v);
      #1;
      er = 1'((int'(a) + int'(b) + int'(c)) % 2);
      es = 1'((int'(a) + int'(b) + int'(c)) / 2) ^ d;
      checks++;
      if ({p, q, r, s} !== {a, b, er, es}) begin
        failures++;
        $display("FAIL abcd=%b%b%b%b -> pqrs=%b%b%b%b", a, b, c, d, p, q, r, s);
      end
      checks++;
      if (seen[{p, q, r, s}]) begin
        failures++;
        $display("FAIL output %b%b%b%b repeated: not reversible", p, q, r, s);
      end
      seen[{p, q, r, s}] = 1'b1;
      if (!d) begin
        checks++;
        if ({s, r} !== 2'(int'(a) + int'(b) + int'(c))) begin
          failures++;
          $display("FAIL full adder %b+%b+%b -> %b%b", a, b, c, s, r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
