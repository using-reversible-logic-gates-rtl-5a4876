// End-to-end self-checking testbench for the 8x8 multiplier at its default parameters (reversible HNG ripple carry adders).
// It applies all 65536 operand pairs, starting with the corner cases, and
// compares p with the integer product a * b. It counts how often each
// mechanism of the adder tree is used and counts a failure for any that
// never happens:
//   c1      carry out of the first 8-bit adder (m1 + m2)
//   c2      carry out of the second 8-bit adder
//   both    c1 and c2 together (carry count 2 into the half adder assembly)
//   ca2     second-stage carry inside a 4x4 multiplier
//   merge   the carry of bit 0 of the half adder assembly
// It also checks that the half adder assembly never carries out of P15.
module tb_ut_mul8x8;
  import ut_pkg::*;
  logic [7:0]  a, b;
  logic [15:0] p;
  int checks = 0, failures = 0;
  int n_c1 = 0, n_c2 = 0, n_both = 0, n_ca2 = 0, n_merge = 0;

  ut_mul8x8 dut (.a(a), .b(b), .p(p));

  task automatic check(input int i, input int j);
    a = 8'(i);
    b = 8'(j);
    #1;
    checks++;
    if (p !== 16'(i * j)) begin
      failures++;
      if (failures < 20) $display("FAIL %0d * %0d -> %0d", i, j, p);
    end
    checks++;
    if (dut.assembly.carry[4]) begin
      failures++;
      $display("FAIL half adder assembly overflow for %0d * %0d", i, j);
    end
    if (dut.c1) n_c1++;
    if (dut.c2) n_c2++;
    if (dut.c1 && dut.c2) n_both++;
    if (dut.mul_ll.ca2 || dut.mul_hl.ca2 || dut.mul_lh.ca2 || dut.mul_hh.ca2) n_ca2++;
    if (dut.assembly.carry[1]) n_merge++;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(255, 255);
    check(111, 222);
    check(0, 0);
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) check(i, j);
    $display("events: c1=%0d c2=%0d both=%0d ca2=%0d merge=%0d",
             n_c1, n_c2, n_both, n_ca2, n_merge);
    checks++;
    if (n_c1 == 0 || n_c2 == 0 || n_both == 0 || n_ca2 == 0 || n_merge == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
