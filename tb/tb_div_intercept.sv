// tb_div_intercept - check of the operand checks and sign handling.
//
// For every pair of 8-bit operands the testbench feeds the block the
// magnitudes of the integer quotient and remainder (computed here with
// truncating integer division) and compares magnitudes, flags, bypass
// results and signed results with values worked out from integers.
module tb_div_intercept;
  import div_pkg::*;

  logic [7:0] dividend, divisor, dd_mag, dv_mag, bq, qm, rm, q, r;
  logic       bypass, dz, ovf;
  int         checks = 0, failures = 0;

  div_intercept dut (
    .dividend(dividend), .divisor(divisor), .dividend_mag(dd_mag),
    .divisor_mag(dv_mag), .bypass(bypass), .div_by_zero(dz), .overflow(ovf),
    .bypass_quot(bq), .quot_mag(qm), .rem_mag(rm),
    .quotient(q), .remainder(r)
  );

  task automatic check(input bit ok, input string what, input int x, input int y);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s for %0d / %0d", what, x, y);
    end
  endtask

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = -128; x < 128; x++) begin
      for (int y = -128; y < 128; y++) begin
        int ax, ay, eq, er;
        bit e_ovf, e_dz, e_one;
        ax = x < 0 ? -x : x;
        ay = y < 0 ? -y : y;
        e_ovf = (x == -128) || (y == -128);
        e_dz  = (y == 0);
        e_one = (ay == 1);
        dividend = 8'(x);
        divisor  = 8'(y);
        if (y != 0) begin
          eq = x / y;       // truncating
          er = x % y;       // sign of the dividend
          qm = 8'(eq < 0 ? -eq : eq);
          rm = 8'(er < 0 ? -er : er);
        end else begin
          eq = 0; er = 0; qm = 8'h00; rm = 8'h00;
        end
        #1;
        check(dz == e_dz, "div_by_zero", x, y);
        check(ovf == e_ovf, "overflow", x, y);
        check(bypass == (e_dz || e_ovf || e_one), "bypass", x, y);
        if (!e_ovf) begin
          check(dd_mag == 8'(ax), "dividend_mag", x, y);
          check(dv_mag == 8'(ay), "divisor_mag", x, y);
        end
        if (e_dz || e_ovf) begin
          check(bq == 8'h00, "error result", x, y);
        end else if (e_one) begin
          check(bq == 8'(x * y), "x/1 result", x, y);
        end
        if (!e_dz && !e_ovf) begin
          check(q == 8'(eq), "quotient", x, y);
          check(r == 8'(er), "remainder", x, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
