// tb_div_ctrl - the sequence control run against a reference datapath.
//
// The controller is connected to the integer register model of div_ref_regs
// in place of the real datapath: each cycle the model supplies b1, b2 and bs
// and applies the transfer the controller chooses. For every dividend 0..127
// and divisor 2..127 the testbench starts a division and checks that the
// model ends with the integer quotient in ARL and remainder in ALR, that
// busy and done behave, and that no division needs more than 48 sequence
// steps (cycles after the negative divisor is formed). It also checks that a
// divisor of 1, which must be caught in front of the sequence, still ends.
module tb_div_ctrl;
  import div_pkg::*;
  import div_ref_regs::*;

  logic       clk = 0, rst_n = 0, start = 0;
  logic       b1, b2, bs, busy, done;
  div_op_e    op;
  logic [3:0] bitpos;
  logic [2:0] fta;
  div_state_e state;
  ref_regs_t  m;
  int         dd, dv;
  int         checks = 0, failures = 0;
  int         maxsteps = 0;
  int         seen_loop2 = 0, seen_shr = 0, seen_add_more = 0;

  div_ctrl dut (
    .clk(clk), .rst_n(rst_n), .start(start), .b1(b1), .b2(b2), .bs(bs),
    .op(op), .bitpos(bitpos), .busy(busy), .done(done), .fta(fta), .state(state)
  );

  always #5 clk = ~clk;

  assign b1 = bit_at(m.al1, int'(bitpos));
  assign b2 = bit_at(m.al2, int'(bitpos));
  assign bs = m.als[7];

  always @(posedge clk) begin
    if (rst_n) begin
      if (state == S_LOOP2) seen_loop2++;
      if (op == OP_SHR) seen_shr++;
      if (op == OP_ADD && bs) seen_add_more++;
      apply(m, op, dd, dv);
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s for %0d / %0d", what, dd, dv);
    end
  endtask

  task automatic run(output int steps);
    int cyc;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    check(busy, "busy after start");
    check(fta[2] == 1'b1, "f set on first pass");
    cyc = 0;
    while (!done && cyc < 200) begin
      @(negedge clk);
      cyc++;
    end
    check(done, "done reached");
    steps = cyc - 1;  // minus the cycle forming the negative divisor
    @(negedge clk);
    check(!busy && !done, "idle after done");
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int steps;
    m = '{default: 0};
    dd = 0; dv = 2;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (dd = 0; dd < 128; dd++) begin
      for (dv = 2; dv < 128; dv++) begin
        run(steps);
        if (steps > maxsteps) maxsteps = steps;
        check(m.arl == dd / dv, "quotient");
        check((m.alr & 255) == dd % dv, "remainder");
      end
    end
    check(maxsteps <= 48, "at most 48 steps");
    check(seen_loop2 > 0 && seen_shr > 0 && seen_add_more > 0, "mechanisms");
    $display("longest division: %0d steps", maxsteps);
    dd = 100; dv = 1;
    run(steps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
