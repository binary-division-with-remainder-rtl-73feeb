// div_ref_regs - reference model of the division register transfers.
//
// Testbench-only package. Holds the ALU registers as plain integers with the
// usual numbering (bit 0 least significant) and applies one register
// transfer to them with integer shifts, masks and additions. Used by the
// datapath and sequence-control testbenches as an independent model.
package div_ref_regs;
  import div_pkg::*;

  typedef struct {
    int al1, al2, alc, alr, als, ald, aln, alp, arl;
  } ref_regs_t;

  // Carry out of each of the 9 positions, returned as a 9-bit value whose
  // most significant bit is the carry out of the most significant position.
  function automatic int carries(int a, int b, int cin);
    int v = 0;
    for (int k = 0; k < 9; k++)
      v |= (((a % (2 << k)) + (b % (2 << k)) + cin) >> (k + 1) & 1) << k;
    return v;
  endfunction

  function automatic int sext8(int x);
    return (x & 255) | (((x >> 7) & 1) << 8);
  endfunction

  function automatic void apply(ref ref_regs_t m, input div_op_e op,
                                input int dividend, input int divisor);
    int x, y, s, na;
    case (op)
      OP_LOAD: begin
        m.al1 = dividend; m.al2 = divisor; m.alp = divisor;
        m.aln = 0; m.als = 0; m.ald = 0; m.arl = 0; m.alr = 0; m.alc = 0;
      end
      OP_NEG: begin
        na    = (~m.alp) & 511;
        m.aln = (na + 1) & 255;
        m.alc = carries(na, 0, 1);
      end
      OP_SHR: begin
        m.ald = ((m.al1 & 1) << 7) | (m.ald >> 1);
        m.al1 = m.al1 >> 1;
        m.als = 128 | (m.als >> 1);
      end
      OP_SHL, OP_SHL_Q01: begin
        m.al1 = ((m.al1 << 1) & 511) | (m.ald >> 7);
        m.ald = (m.ald << 1) & 255;
        m.als = (m.als << 1) & 255;
        m.arl = (op == OP_SHL) ? (m.arl << 1) & 255 : ((m.arl << 2) | 1) & 255;
      end
      OP_Q0_REM: begin
        m.alr = m.al1;
        m.arl = (m.arl << 1) & 255;
      end
      OP_Q1: m.arl = ((m.arl << 1) | 1) & 255;
      OP_Q1_REM0: begin
        m.alr = 0;
        m.arl = ((m.arl << 1) | 1) & 255;
      end
      OP_ADD: begin
        x = sext8(m.al1);
        y = sext8(m.aln);
        s = (x + y) & 511;
        m.alr = s;
        m.alc = carries(x, y, 0);
        if (m.als >= 128) begin
          m.al1 = ((s << 1) & 511) | (m.ald >> 7);
          m.ald = (m.ald << 1) & 255;
          m.als = (m.als << 1) & 255;
          m.al2 = m.alp;
        end else begin
          m.al1 = x;
          m.al2 = y;
        end
      end
      default: ;
    endcase
  endfunction

  // Bit at position pos, 1 = leftmost of a 9-bit value; 0 outside 1..9.
  function automatic bit bit_at(int v, int pos);
    if (pos < 1 || pos > 9) return 1'b0;
    return bit'((v >> (9 - pos)) & 1);
  endfunction
endpackage
