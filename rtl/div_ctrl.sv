// div_ctrl - sequence control of the division ALU.
//
// Runs the shift-and-subtract division sequence for positive operands one step
// per clock cycle. It owns the bit counter (`bitpos`, 1 = leftmost bit) and
// the three control bits of the description: f (first pass of the outer
// loop), t (the second partial loop is needed) and a (the negative divisor is
// to be added). From the bits b1 and b2 of AL1 and AL2 at `bitpos` and the
// leftmost bit bs of the shifting pointer it picks the register transfer
// `op` that the datapath performs in the same cycle.
//
//   S_NEG    form the negative divisor, start the bit counter at 3.
//   S_LOOP1  compare from the left. 0/0: next bit. 1/0 on the first pass:
//            shift the dividend right (alignment), next bit; on later passes
//            the partial dividend is larger: quotient bit 1, add. 0/1: shift
//            left if ALS allows (quotient bit 0), otherwise the division ends
//            with the remainder in AL1. 1/1: the next bits decide, go to
//            S_LOOP2 at the next bit.
//   S_LOOP2  equal bits: next bit; at the last bit the values are equal,
//            quotient bit 1, and either add or end with remainder 0. 1/0:
//            quotient bit 1, add. 0/1: shift left and append 01 then add, or
//            end with quotient bit 0 and the remainder in AL1.
//   S_ADD    add the negative divisor; if ALS still holds a 1, the next
//            dividend bit comes down and a new pass of the outer loop starts
//            with f cleared, otherwise the division ends.
//   S_DONE   quotient in ARL and remainder in ALR; `done` is high here for
//            one cycle.
//
// Interface: `start` is taken in S_IDLE (the datapath loads the operands in
// that cycle, OP_LOAD); `busy` is high from the next cycle until S_DONE.
// A division by 0 or 1 is not defined for this sequence and must be caught
// in front of it; should one reach it, the comparison runs off the last bit
// and the sequence ends at once with whatever the registers hold.
//
// The sequence and the control bits are the description's; the encoding as
// states, the one-step-per-cycle timing and the handshake are this design's.
module div_ctrl
  import div_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,   // start a division
  input  logic       b1,      // AL1 bit at bitpos
  input  logic       b2,      // AL2 bit at bitpos
  input  logic       bs,      // ALS leftmost bit
  output div_op_e    op,      // register transfer for this cycle
  output logic [3:0] bitpos,  // bit counter
  output logic       busy,    // division in progress
  output logic       done,    // result ready (one cycle)
  output logic [2:0] fta,     // control bits {f, t, a}
  output div_state_e state    // current state
);

  div_state_e state_q, state_d;
  logic [3:0] bit_q, bit_d;
  logic       f_q, f_d, t_q, t_d, a_q, a_d;
  logic       last;

  assign state  = state_q;
  assign bitpos = bit_q;
  assign fta    = {f_q, t_q, a_q};
  assign busy   = (state_q != S_IDLE);
  assign done   = (state_q == S_DONE);
  assign last   = (bit_q == BIT_LAST);

  always_comb begin
    state_d = state_q;
    bit_d   = bit_q;
    f_d     = f_q;
    t_d     = t_q;
    a_d     = a_q;
    op      = OP_NONE;

    unique case (state_q)
      S_IDLE: begin
        if (start) begin
          op      = OP_LOAD;
          f_d     = 1'b1;
          t_d     = 1'b0;
          a_d     = 1'b0;
          state_d = S_NEG;
        end
      end

      S_NEG: begin
        op      = OP_NEG;
        bit_d   = BIT_FIRST;
        state_d = S_LOOP1;
      end

      S_LOOP1: begin
        unique case ({b1, b2})
          2'b00: begin
            if (last) state_d = S_DONE;  // 0/0 undefined
            else      bit_d   = bit_q + 4'd1;
          end
          2'b01: begin
            if (bs) begin
              op = OP_SHL;
            end else begin
              op      = OP_Q0_REM;     // dividend smaller than divisor
              t_d     = 1'b0;
              a_d     = 1'b0;
              state_d = S_DONE;
            end
          end
          2'b10: begin
            if (last) begin
              state_d = S_DONE;        // x/0 undefined
            end else if (f_q) begin
              op    = OP_SHR;          // align dividend under divisor
              bit_d = bit_q + 4'd1;
            end else begin
              op      = OP_Q1;
              t_d     = 1'b0;
              a_d     = 1'b1;
              state_d = S_ADD;
            end
          end
          2'b11: begin
            if (last) begin
              state_d = S_DONE;        // x/1 must be caught before
            end else begin
              t_d     = 1'b1;
              bit_d   = bit_q + 4'd1;
              state_d = S_LOOP2;
            end
          end
          default: ;
        endcase
      end

      S_LOOP2: begin
        unique case ({b1, b2})
          2'b00, 2'b11: begin
            if (last) begin
              // Partial dividend equals the divisor.
              if (bs) begin
                op      = OP_Q1;
                a_d     = 1'b1;
                state_d = S_ADD;
              end else begin
                op      = OP_Q1_REM0;
                a_d     = 1'b0;
                state_d = S_DONE;
              end
            end else begin
              bit_d = bit_q + 4'd1;
            end
          end
          2'b01: begin
            if (bs) begin
              op      = OP_SHL_Q01;
              a_d     = 1'b1;
              state_d = S_ADD;
            end else begin
              op      = OP_Q0_REM;
              a_d     = 1'b0;
              state_d = S_DONE;
            end
          end
          2'b10: begin
            op      = OP_Q1;
            a_d     = 1'b1;
            state_d = S_ADD;
          end
          default: ;
        endcase
      end

      S_ADD: begin
        op = OP_ADD;
        if (bs) begin
          f_d     = 1'b0;
          bit_d   = BIT_FIRST;
          state_d = S_LOOP1;
        end else begin
          state_d = S_DONE;
        end
      end

      S_DONE: begin
        state_d = S_IDLE;
      end

      default: state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      bit_q   <= BIT_FIRST;
      f_q     <= 1'b0;
      t_q     <= 1'b0;
      a_q     <= 1'b0;
    end else begin
      state_q <= state_d;
      bit_q   <= bit_d;
      f_q     <= f_d;
      t_q     <= t_d;
      a_q     <= a_d;
    end
  end

endmodule
