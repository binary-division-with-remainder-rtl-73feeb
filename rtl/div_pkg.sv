// div_pkg - types and constants shared by the 9+8 bit division ALU.
//
// The ALU works on 8-bit operands held in 9-bit registers (one sign
// extension bit in front of the 8-bit two's complement number) and on 8-bit
// auxiliary registers. Bits are numbered from the left, 1 being the most
// significant, so that the bit counter of the sequence control indexes a
// register directly: position 1 is the sign extension, position 2 the sign,
// positions 3..9 the magnitude of a positive operand.
//
// The register-transfer operations (div_op_e) are this design's encoding of
// the steps of the division sequence; each one is executed by the datapath
// in a single clock cycle.
package div_pkg;

  localparam int unsigned OPW  = 8;  // operand width (8 bit registers)
  localparam int unsigned ALUW = 9;  // arithmetic unit width (9 bit registers)

  // Bit counter values of the sequence control.
  localparam logic [3:0] BIT_FIRST = 4'd3;  // first magnitude bit
  localparam logic [3:0] BIT_LAST  = 4'd9;  // least significant bit

  typedef logic [1:ALUW] reg9_t;
  typedef logic [1:OPW]  reg8_t;

  // Register transfers performed by the datapath, one per clock cycle.
  typedef enum logic [3:0] {
    OP_NONE,     // hold all registers
    OP_LOAD,     // load operands, clear pointer, shift register and quotient
    OP_NEG,      // ALN <= -ALP, formed in the adder
    OP_SHR,      // AL1 >> 1 into ALD, a 1 enters ALS from the left
    OP_SHL,      // AL1 << 1 taking the next ALD bit, ALS << 1, quotient bit 0
    OP_SHL_Q01,  // as OP_SHL, then quotient bit 1 as well
    OP_Q0_REM,   // quotient bit 0, remainder ALR <= AL1 (last step)
    OP_Q1,       // quotient bit 1
    OP_Q1_REM0,  // quotient bit 1, remainder ALR <= 0 (last step)
    OP_ADD       // ALR <= AL1 + ALN; if ALS allows, take the next dividend bit
  } div_op_e;

  // States of the sequence control.
  typedef enum logic [2:0] {
    S_IDLE,   // waiting for start
    S_NEG,    // forming the negative divisor
    S_LOOP1,  // first partial loop: align and compare from the left
    S_LOOP2,  // second partial loop: compare the remaining bits
    S_ADD,    // addition of the negative divisor
    S_DONE    // quotient in ARL, remainder in ALR
  } div_state_e;

  // The register set of the ALU.
  typedef struct packed {
    reg9_t al1;  // operand 1 / partial dividend
    reg9_t al2;  // operand 2 / divisor
    reg9_t alc;  // carry over of the last addition
    reg9_t alr;  // remainder (result of an addition)
    reg8_t als;  // shifting pointer
    reg8_t ald;  // dividend shift register
    reg8_t aln;  // negative divisor
    reg8_t alp;  // positive divisor
    reg8_t arl;  // result (quotient)
  } div_regs_t;

endpackage
