// alu_add9 - the 9-bit arithmetic unit of the division ALU.
//
// A ripple-carry adder of nine full adders. Both addends arrive already
// sign-extended to 9 bits (the caller duplicates the sign bit), so the sum is
// the 9-bit two's complement sum. Besides the sum it returns the carry out of
// every bit position; the datapath stores that vector in its carry-over
// register ALC. Bit numbering follows the rest of the ALU: position 1 is the
// leftmost (most significant) bit, position 9 the least significant, and cin
// enters at position 9.
//
// That the unit is a 9-bit adder with sign extension follows the design's
// description; the ripple-carry structure and the meaning of ALC as the
// per-bit carry vector are this design's choices. Purely combinational.
module alu_add9
  import div_pkg::*;
(
  input  reg9_t a,      // first addend
  input  reg9_t b,      // second addend
  input  logic  cin,    // carry into position 9
  output reg9_t sum,    // a + b + cin, 9 bits
  output reg9_t carry   // carry out of each position
);

  // c[i] is the carry into position i; c[ALUW+1] is the carry in.
  logic [1:ALUW+1] c;

  assign c[ALUW+1] = cin;

  for (genvar i = 1; i <= ALUW; i++) begin : g_fa
    assign sum[i]   = a[i] ^ b[i] ^ c[i+1];
    assign c[i]     = (a[i] & b[i]) | (a[i] & c[i+1]) | (b[i] & c[i+1]);
    assign carry[i] = c[i];
  end

endmodule
