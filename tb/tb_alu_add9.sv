// tb_alu_add9 - exhaustive check of the 9-bit adder.
//
// Applies every pair of 9-bit addends with both carry-in values and compares
// the sum with integer addition, and each carry bit with the carry out of
// the same number of low bits added as integers.
module tb_alu_add9;
  import div_pkg::*;

  reg9_t a, b, sum, carry;
  logic  cin;
  int    checks = 0, failures = 0;

  alu_add9 dut (.a(a), .b(b), .cin(cin), .sum(sum), .carry(carry));

  initial begin
    #100ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ia = 0; ia < 512; ia++) begin
      for (int ib = 0; ib < 512; ib++) begin
        for (int ic = 0; ic < 2; ic++) begin
          int full, k, lo;
          a = 9'(ia); b = 9'(ib); cin = ic[0];
          #1;
          full = ia + ib + ic;
          checks++;
          if (sum != 9'(full)) begin
            failures++;
            if (failures < 10) $display("sum %0d+%0d+%0d = %0d", ia, ib, ic, sum);
          end
          // carry[i] with position i = 9 - k (k = 0 is the least significant)
          for (k = 0; k < 9; k++) begin
            lo = ((ia % (2 << k)) + (ib % (2 << k)) + ic) >> (k + 1);
            checks++;
            if (carry[9 - k] != lo[0]) begin
              failures++;
              if (failures < 10) $display("carry %0d+%0d+%0d bit %0d", ia, ib, ic, k);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
