// tb_alu_div - end-to-end check of the division unit.
//
// Runs every pair of 8-bit two's complement operands through the unit (the
// top has no parameters, so this is the full-size design) and compares
// quotient, remainder and the two error flags with integer division
// (truncating; remainder with the sign of the dividend; -128 as an operand
// and a divisor of 0 flagged). It checks the handshake: busy from the cycle
// after start until done, done high for one cycle, results held until the
// next start, start ignored while busy. It checks the latency: two cycles
// for an intercepted case, and for a division exactly four cycles (operand
// register, load, negative divisor, result register) plus the sequence steps,
// of which the longest division needs 48.
// Each mechanism of the sequence is counted, and one that never occurs counts
// as a failure: alignment shifts, left shifts, the second partial loop, an
// addition followed by a further pass, a final addition, the three ways the
// sequence ends, each intercepted case and negative operands. Directed
// back-to-back cases then follow each error with a division to show that the
// error flags clear.
module tb_alu_div;
  import div_pkg::*;

  logic       clk = 0, rst_n = 0, start = 0;
  logic [7:0] dividend = '0, divisor = '0, quotient, remainder;
  logic       busy, done, div_by_zero, overflow;
  int         checks = 0, failures = 0;
  int         x, y;

  // mechanism counters
  int n_shr, n_shl, n_shl_q01, n_loop2, n_add_more, n_add_last;
  int n_end_small, n_end_rem0, n_end_add, n_div0, n_ovf, n_one, n_neg;
  int n_ignored, max_lat, max_steps, seq_steps;

  alu_div dut (
    .clk(clk), .rst_n(rst_n), .start(start), .dividend(dividend),
    .divisor(divisor), .busy(busy), .done(done), .quotient(quotient),
    .remainder(remainder), .div_by_zero(div_by_zero), .overflow(overflow)
  );

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (start && !busy) seq_steps = 0;
    if (rst_n) begin
      if (dut.u_ctrl.state inside {S_LOOP1, S_LOOP2, S_ADD}) seq_steps++;
      unique case (dut.u_ctrl.op)
        OP_SHR:     n_shr++;
        OP_SHL:     n_shl++;
        OP_SHL_Q01: n_shl_q01++;
        OP_Q0_REM:  n_end_small++;
        OP_Q1_REM0: n_end_rem0++;
        OP_ADD:     if (dut.u_dp.bs) n_add_more++; else begin n_add_last++; n_end_add++; end
        default: ;
      endcase
      if (dut.u_ctrl.state == S_LOOP2 && $past(dut.u_ctrl.state) != S_LOOP2) n_loop2++;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s for %0d / %0d: q=%0d r=%0d", what, x, y,
                                  $signed(quotient), $signed(remainder));
    end
  endtask

  task automatic divide(input int a, input int b);
    int  lat, eq, er;
    bit  e_dz, e_ovf;
    x = a; y = b;
    @(negedge clk);
    dividend = 8'(a);
    divisor  = 8'(b);
    start    = 1;
    @(negedge clk);
    start    = 0;
    lat      = 1;
    check(busy, "busy after start");
    while (!done && lat < 100) begin
      // a second start while busy must be ignored
      if (lat == 3) begin
        start = 1; dividend = 8'($urandom); divisor = 8'($urandom);
      end else begin
        start = 0;
      end
      @(negedge clk);
      lat++;
    end
    start = 0;
    if (lat > 3) n_ignored++;
    check(done, "done reached");
    if (lat > max_lat) max_lat = lat;
    e_dz  = (b == 0);
    e_ovf = (a == -128) || (b == -128);
    if (e_dz || e_ovf) begin
      check(div_by_zero == e_dz && overflow == e_ovf, "error flags");
      check(quotient == 8'h00 && remainder == 8'h00, "error result");
      check(lat == 2, "intercept latency");
      if (e_dz) n_div0++;
      if (e_ovf) n_ovf++;
    end else begin
      eq = a / b;
      er = a % b;
      check(!div_by_zero && !overflow, "no error flags");
      check(quotient == 8'(eq), "quotient");
      check(remainder == 8'(er), "remainder");
      if (b == 1 || b == -1) begin
        check(lat == 2, "intercept latency");
        n_one++;
      end else begin
        check(seq_steps <= 48, "at most 48 sequence steps");
        check(lat == seq_steps + 4, "division latency = steps + 4");
        if (seq_steps > max_steps) max_steps = seq_steps;
      end
      if (a < 0 || b < 0) n_neg++;
    end
    // one cycle later: done gone, unit idle, results held
    @(negedge clk);
    check(!done && !busy, "done is one cycle, then idle");
    if (!e_dz && !e_ovf) check(quotient == 8'(a / b) && remainder == 8'(a % b), "results held");
  endtask

  initial begin
    repeat (10000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = -128; a < 128; a++)
      for (int b = -128; b < 128; b++)
        divide(a, b);
    // flags of an intercepted case must not stick to the next division
    divide(5, 0);     divide(100, 7);
    divide(-128, 3);  divide(-100, 7);
    divide(0, 0);     divide(-128, -128);  divide(127, -2);
    $display("align %0d, shift-left %0d, shift-left+1 %0d, loop2 %0d, add+pass %0d, final add %0d",
             n_shr, n_shl, n_shl_q01, n_loop2, n_add_more, n_add_last);
    $display("end dividend<divisor %0d, end remainder 0 %0d, end after add %0d",
             n_end_small, n_end_rem0, n_end_add);
    $display("div0 %0d, overflow %0d, by +-1 %0d, negative operands %0d, start ignored %0d, max latency %0d, max steps %0d",
             n_div0, n_ovf, n_one, n_neg, n_ignored, max_lat, max_steps);
    check(n_shr > 0, "alignment shift happened");
    check(n_shl > 0, "left shift happened");
    check(n_shl_q01 > 0, "left shift with quotient 01 happened");
    check(n_loop2 > 0, "second partial loop happened");
    check(n_add_more > 0, "addition with further pass happened");
    check(n_add_last > 0, "final addition happened");
    check(n_end_small > 0, "end with dividend < divisor happened");
    check(n_end_rem0 > 0, "end with remainder 0 happened");
    check(n_div0 > 0 && n_ovf > 0 && n_one > 0, "intercepted cases happened");
    check(n_neg > 0, "negative operands happened");
    check(n_ignored > 0, "start while busy happened");
    check(max_steps == 48, "longest division takes 48 steps");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
