// div_datapath - register set and register transfers of the division ALU.
//
// Holds the nine registers of the ALU: the 9-bit registers AL1 (partial
// dividend), AL2 (divisor), ALC (carry over) and ALR (remainder), and the
// 8-bit registers ALS (shifting pointer), ALD (dividend shift register), ALN
// (negative divisor), ALP (positive divisor) and ARL (quotient). Each clock
// cycle it performs the one register transfer named by `op`, which the
// sequence control chooses from the bits it reads here:
//   b1, b2  the bits of AL1 and AL2 at the position `bitpos` (1 = leftmost),
//   bs      the leftmost bit of ALS, set while a dividend bit that was moved
//           out of AL1 into ALD still has to be brought back.
// The dividend is aligned under the divisor by shifting AL1 right into ALD,
// each such shift entering a 1 into ALS from the left; every later left shift
// of AL1 takes the next bit back from ALD and shifts ALS left. Quotient bits
// are appended to ARL from the right.
//
// All transfers follow the division sequence of the design's description,
// with these choices of its own: a transfer takes one clock cycle; the
// negative divisor ALN is formed in the adder (OP_NEG) from ALP; during
// OP_ADD the adder takes ALN directly instead of first copying it into AL2,
// and AL2 ends holding ALN or, when the sequence goes on, the positive
// divisor again, as the description leaves it. Reset (asynchronous, active
// low) clears every register.
module div_datapath
  import div_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  div_op_e    op,        // register transfer for this cycle
  input  reg8_t      dividend,  // positive dividend, taken by OP_LOAD
  input  reg8_t      divisor,   // positive divisor, taken by OP_LOAD
  input  logic [3:0] bitpos,    // compared bit position, 1..9
  output logic       b1,        // AL1 bit at bitpos
  output logic       b2,        // AL2 bit at bitpos
  output logic       bs,        // ALS leftmost bit
  output div_regs_t  regs       // register contents
);

  div_regs_t r;
  reg9_t     add_a, add_b, add_sum, add_carry;
  logic      add_cin;

  assign regs = r;
  assign bs   = r.als[1];

  // Bit selection; positions outside 1..9 read as 0.
  always_comb begin
    b1 = 1'b0;
    b2 = 1'b0;
    if (bitpos >= 4'd1 && bitpos <= 4'(ALUW)) begin
      b1 = r.al1[bitpos];
      b2 = r.al2[bitpos];
    end
  end

  // Adder operands: forming -ALP, or AL1 + ALN with both signs duplicated.
  always_comb begin
    if (op == OP_NEG) begin
      add_a   = ~{1'b0, r.alp};
      add_b   = '0;
      add_cin = 1'b1;
    end else begin
      add_a   = {r.al1[2], r.al1[2:ALUW]};
      add_b   = {r.aln[1], r.aln};
      add_cin = 1'b0;
    end
  end

  alu_add9 u_add (
    .a     (add_a),
    .b     (add_b),
    .cin   (add_cin),
    .sum   (add_sum),
    .carry (add_carry)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r <= '0;
    end else begin
      unique case (op)
        OP_NONE: ;
        OP_LOAD: begin
          r.al1 <= {1'b0, dividend};
          r.al2 <= {1'b0, divisor};
          r.alp <= divisor;
          r.aln <= '0;
          r.als <= '0;
          r.ald <= '0;
          r.arl <= '0;
          r.alr <= '0;
          r.alc <= '0;
        end
        OP_NEG: begin
          r.aln <= add_sum[2:ALUW];
          r.alc <= add_carry;
        end
        OP_SHR: begin
          r.ald <= {r.al1[ALUW], r.ald[1:OPW-1]};
          r.al1 <= {1'b0, r.al1[1:ALUW-1]};
          r.als <= {1'b1, r.als[1:OPW-1]};
        end
        OP_SHL: begin
          r.al1 <= {r.al1[2:ALUW], r.ald[1]};
          r.ald <= {r.ald[2:OPW], 1'b0};
          r.als <= {r.als[2:OPW], 1'b0};
          r.arl <= {r.arl[2:OPW], 1'b0};
        end
        OP_SHL_Q01: begin
          r.al1 <= {r.al1[2:ALUW], r.ald[1]};
          r.ald <= {r.ald[2:OPW], 1'b0};
          r.als <= {r.als[2:OPW], 1'b0};
          r.arl <= {r.arl[3:OPW], 2'b01};
        end
        OP_Q0_REM: begin
          r.alr <= r.al1;
          r.arl <= {r.arl[2:OPW], 1'b0};
        end
        OP_Q1: begin
          r.arl <= {r.arl[2:OPW], 1'b1};
        end
        OP_Q1_REM0: begin
          r.alr <= '0;
          r.arl <= {r.arl[2:OPW], 1'b1};
        end
        OP_ADD: begin
          r.alr <= add_sum;
          r.alc <= add_carry;
          if (r.als[1]) begin
            // Difference becomes the partial dividend and takes the next bit.
            r.al1 <= {add_sum[2:ALUW], r.ald[1]};
            r.ald <= {r.ald[2:OPW], 1'b0};
            r.als <= {r.als[2:OPW], 1'b0};
            r.al2 <= {1'b0, r.alp};
          end else begin
            r.al1 <= add_a;
            r.al2 <= add_b;
          end
        end
        default: ;
      endcase
    end
  end

endmodule
