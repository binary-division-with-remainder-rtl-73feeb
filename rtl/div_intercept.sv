// div_intercept - operand checks and signs around the positive division.
//
// The division sequence works on positive operands only, and divisors 0 and
// 1 must be caught before it starts. This block sits around it:
//   in front  it takes two 8-bit two's complement operands, flags the cases
//             the sequence cannot run (divisor 0, divisor +1 or -1, and an
//             operand of -128, whose two's complement does not fit in 8
//             bits), gives their results directly (`bypass`), and otherwise
//             hands the magnitudes of both operands to the sequence;
//   behind    it gives the quotient and remainder magnitudes of the sequence
//             their signs.
// Sign rule: the quotient is negative when exactly one operand is, the
// remainder takes the sign of the dividend (truncating division, as in C),
// so dividend = quotient * divisor + remainder always holds.
// Results of the bypassed cases: x / 1 = x, x / -1 = -x; a division by zero
// or an operand of -128 gives quotient 0 with `div_by_zero` or `overflow`
// set. The remainder of every bypassed case is 0.
//
// That 0 and 1 are caught in front, that the range is -128..127 and that -128
// overflows follow the design's description. Handling signed operands by
// magnitudes, the sign rule, the treatment of -1 and the results returned on
// an error are this design's choices. Purely combinational.
module div_intercept
  import div_pkg::*;
(
  input  logic [OPW-1:0] dividend,     // two's complement dividend
  input  logic [OPW-1:0] divisor,      // two's complement divisor
  output logic [OPW-1:0] dividend_mag, // |dividend|, to the sequence
  output logic [OPW-1:0] divisor_mag,  // |divisor|, to the sequence
  output logic           bypass,       // result known without the sequence
  output logic           div_by_zero,  // divisor is 0
  output logic           overflow,     // an operand is -128
  output logic [OPW-1:0] bypass_quot,  // quotient of a bypassed case
  input  logic [OPW-1:0] quot_mag,     // quotient from the sequence
  input  logic [OPW-1:0] rem_mag,      // remainder from the sequence
  output logic [OPW-1:0] quotient,     // signed quotient
  output logic [OPW-1:0] remainder     // signed remainder
);

  localparam logic [OPW-1:0] MOST_NEG = {1'b1, {(OPW-1){1'b0}}};
  localparam logic [OPW-1:0] ONE      = OPW'(1);

  logic sd, sv, by_one;

  assign sd = dividend[OPW-1];
  assign sv = divisor[OPW-1];

  assign dividend_mag = sd ? (~dividend + ONE) : dividend;
  assign divisor_mag  = sv ? (~divisor + ONE)  : divisor;

  assign div_by_zero = (divisor == '0);
  assign overflow    = (dividend == MOST_NEG) || (divisor == MOST_NEG);
  assign by_one      = (divisor_mag == ONE);
  assign bypass      = div_by_zero || overflow || by_one;

  always_comb begin
    bypass_quot = '0;
    if (!div_by_zero && !overflow && by_one)
      bypass_quot = sv ? (~dividend + ONE) : dividend;
  end

  assign quotient  = (sd ^ sv) ? (~quot_mag + ONE) : quot_mag;
  assign remainder = sd ? (~rem_mag + ONE) : rem_mag;

endmodule
