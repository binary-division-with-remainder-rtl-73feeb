// alu_div - 8-bit division with remainder on a 9+8 bit ALU.
//
// Divides two 8-bit two's complement numbers (range -127..127) and returns
// the quotient and the remainder. The work is done by a shift-and-compare
// sequence for positive operands: the dividend is first aligned under the
// divisor by shifting it right into an auxiliary register, the partial
// dividend and the divisor are then compared bit by bit from the left, and
// wherever the partial dividend is the larger the negative divisor is added
// in the 9-bit adder and a 1 is appended to the quotient; a shifting pointer
// register tracks how many dividend bits are still to be brought back.
//
// Blocks: div_intercept (operand checks, magnitudes and signs), div_ctrl
// (sequence control with the control bits f, t, a and the bit counter) and
// div_datapath (the registers AL1, AL2, ALC, ALR, ALS, ALD, ALN, ALP, ARL
// and the adder alu_add9).
//
// Interface and timing: raise `start` for one cycle with the operands
// present; they are registered in that cycle. One cycle later the unit either
// answers at once (divisor 0, +1 or -1, or an operand of -128) or starts the
// sequence, which takes one cycle per step: loading, forming the negative
// divisor, one cycle per compared bit or shift, one per addition. `done`
// rises 4 cycles plus the number of sequence steps after `start`; the longest
// division of two operands from -127..127 takes 48 steps (52 cycles). `done` is
// high for one cycle when `quotient`, `remainder`, `div_by_zero` and
// `overflow` are valid; they stay valid until the next `start`. `busy` is
// high from the cycle after `start` until `done`. `start` while busy is
// ignored. Reset is asynchronous and active low.
//
// The sequence, the register set and the restriction of the operands follow
// the design's description; the handshake, the cycle timing and the sign
// handling are this design's choices.
module alu_div
  import div_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,        // start a division
  input  logic [OPW-1:0] dividend,     // two's complement dividend
  input  logic [OPW-1:0] divisor,      // two's complement divisor
  output logic           busy,         // division in progress
  output logic           done,         // results valid (one cycle)
  output logic [OPW-1:0] quotient,     // two's complement quotient
  output logic [OPW-1:0] remainder,    // remainder, sign of the dividend
  output logic           div_by_zero,  // divisor was 0
  output logic           overflow      // an operand was -128
);

  typedef enum logic [1:0] {T_IDLE, T_CHECK, T_RUN} top_state_e;

  top_state_e     state_q;
  logic [OPW-1:0] dividend_q, divisor_q;

  // Interception
  logic [OPW-1:0] dd_mag, dv_mag, byp_q, sq, sr;
  logic           bypass, dz, ovf;

  // Core
  logic           core_start, core_busy, core_done, b1, b2, bs;
  logic [3:0]     bitpos;
  logic [2:0]     fta;
  div_op_e        op;
  div_state_e     core_state;
  div_regs_t      regs;

  div_intercept u_icpt (
    .dividend     (dividend_q),
    .divisor      (divisor_q),
    .dividend_mag (dd_mag),
    .divisor_mag  (dv_mag),
    .bypass       (bypass),
    .div_by_zero  (dz),
    .overflow     (ovf),
    .bypass_quot  (byp_q),
    .quot_mag     (regs.arl),
    .rem_mag      (regs.alr[2:ALUW]),
    .quotient     (sq),
    .remainder    (sr)
  );

  assign core_start = (state_q == T_CHECK) && !bypass;

  div_ctrl u_ctrl (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (core_start),
    .b1     (b1),
    .b2     (b2),
    .bs     (bs),
    .op     (op),
    .bitpos (bitpos),
    .busy   (core_busy),
    .done   (core_done),
    .fta    (fta),
    .state  (core_state)
  );

  div_datapath u_dp (
    .clk      (clk),
    .rst_n    (rst_n),
    .op       (op),
    .dividend (dd_mag),
    .divisor  (dv_mag),
    .bitpos   (bitpos),
    .b1       (b1),
    .b2       (b2),
    .bs       (bs),
    .regs     (regs)
  );

  assign busy = (state_q != T_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= T_IDLE;
      dividend_q  <= '0;
      divisor_q   <= '0;
      done        <= 1'b0;
      quotient    <= '0;
      remainder   <= '0;
      div_by_zero <= 1'b0;
      overflow    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        T_IDLE: begin
          if (start) begin
            dividend_q <= dividend;
            divisor_q  <= divisor;
            state_q    <= T_CHECK;
          end
        end
        T_CHECK: begin
          if (bypass) begin
            quotient    <= byp_q;
            remainder   <= '0;
            div_by_zero <= dz;
            overflow    <= ovf;
            done        <= 1'b1;
            state_q     <= T_IDLE;
          end else begin
            state_q <= T_RUN;
          end
        end
        T_RUN: begin
          if (core_done) begin
            quotient    <= sq;
            remainder   <= sr;
            div_by_zero <= 1'b0;
            overflow    <= 1'b0;
            done        <= 1'b1;
            state_q     <= T_IDLE;
          end
        end
        default: state_q <= T_IDLE;
      endcase
    end
  end

  // The sequence is only started when the top is ready for its result.
  assert property (@(posedge clk) disable iff (!rst_n)
                   core_done |-> state_q == T_RUN)
    else $error("alu_div: sequence finished outside T_RUN");

  // The sequence runs only while the top waits for it.
  assert property (@(posedge clk) disable iff (!rst_n)
                   core_busy |-> state_q == T_RUN)
    else $error("alu_div: sequence busy outside T_RUN");

endmodule
