// tb_div_datapath - random register-transfer check of the datapath.
//
// Drives random sequences of register transfers (starting each with a load
// of random operands) and random bit positions, and after every clock
// compares all nine registers and the b1, b2 and bs outputs with the integer
// reference model of div_ref_regs.
module tb_div_datapath;
  import div_pkg::*;
  import div_ref_regs::*;

  logic       clk = 0, rst_n = 0;
  div_op_e    op;
  reg8_t      dividend, divisor;
  logic [3:0] bitpos;
  logic       b1, b2, bs;
  div_regs_t  regs;
  ref_regs_t  m;
  int         checks = 0, failures = 0;
  int         opcount[div_op_e];

  div_datapath dut (
    .clk(clk), .rst_n(rst_n), .op(op), .dividend(dividend), .divisor(divisor),
    .bitpos(bitpos), .b1(b1), .b2(b2), .bs(bs), .regs(regs)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s after op %s at %0t", what, op.name(), $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    op = OP_NONE; dividend = '0; divisor = '0; bitpos = 4'd3;
    m = '{default: 0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 50000; n++) begin
      @(negedge clk);
      if (n % 40 == 0) op = OP_LOAD;
      else op = div_op_e'($urandom_range(0, 9));
      dividend = 8'($urandom);
      divisor  = 8'($urandom);
      bitpos   = 4'($urandom);
      #1;
      check(b1 == bit_at(m.al1, int'(bitpos)), "b1");
      check(b2 == bit_at(m.al2, int'(bitpos)), "b2");
      check(bs == m.als[7], "bs");
      opcount[op]++;
      apply(m, op, int'(dividend), int'(divisor));
      @(posedge clk);
      #1;
      check(int'(regs.al1) == m.al1, "AL1");
      check(int'(regs.al2) == m.al2, "AL2");
      check(int'(regs.alc) == m.alc, "ALC");
      check(int'(regs.alr) == m.alr, "ALR");
      check(int'(regs.als) == m.als, "ALS");
      check(int'(regs.ald) == m.ald, "ALD");
      check(int'(regs.aln) == m.aln, "ALN");
      check(int'(regs.alp) == m.alp, "ALP");
      check(int'(regs.arl) == m.arl, "ARL");
    end
    for (int o = 0; o < 10; o++) check(opcount[div_op_e'(o)] > 0, "every op exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
