// Self-checking testbench for ut_mul4x4. Multiplies every pair of 4-bit
// operands with both adder choices and compares with the integer product.
// It starts with the worked vertical-and-crosswise example 1101 x 1010
// (13 x 10 = 130). It counts how often each adder carry fires and fails if
// the second-stage carry ca2 (the one that must be added at the top adder)
// never fires on its own, and checks that ca1 and ca2 are never 1 together
// and that the top adder never carries out.
module tb_ut_mul4x4;
  import ut_pkg::*;
  logic [3:0] a, b;
  logic [7:0] p_rca, p_cla;
  int checks = 0, failures = 0;
  int n_ca1 = 0, n_ca2 = 0;

  ut_mul4x4                     dut     (.a(a), .b(b), .p(p_rca));
  ut_mul4x4 #(.ADDER(ADDER_CLA)) dut_cla (.a(a), .b(b), .p(p_cla));

  task automatic check(input int i, input int j);
    a = 4'(i);
    b = 4'(j);
    #1;
    checks++;
    if (p_rca !== 8'(i * j)) begin
      failures++;
      $display("FAIL rca %0d * %0d -> %0d", i, j, p_rca);
    end
    checks++;
    if (p_cla !== 8'(i * j)) begin
      failures++;
      $display("FAIL cla %0d * %0d -> %0d", i, j, p_cla);
    end
    checks++;
    if (dut.ca1 && dut.ca2) begin
      failures++;
      $display("FAIL ca1 and ca2 both set for %0d * %0d", i, j);
    end
    checks++;
    if (dut.ca3_unused) begin
      failures++;
      $display("FAIL top adder carried out for %0d * %0d", i, j);
    end
    if (dut.ca1) n_ca1++;
    if (dut.ca2) n_ca2++;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(4'b1101, 4'b1010);
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) check(i, j);
    $display("carry events: ca1=%0d ca2=%0d", n_ca1, n_ca2);
    checks++;
    if (n_ca1 == 0 || n_ca2 == 0) begin
      failures++;
      $display("FAIL a carry path was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
