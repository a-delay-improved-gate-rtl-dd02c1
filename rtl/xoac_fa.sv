// xoac_fa: one-bit full adder built from XOR, OR, AND and an AND-OR complex
// gate (the "XOAC" adder).
//
// sum  = a ^ b ^ cin                  one three-input XOR
// cout = (a & b) | ((a | b) & cin)    OR2 and AND2 on the operands, then one
//                                     AND-OR term that carry-in enters
//
// The carry expression is the majority function written so that the operand
// terms (a|b and a&b) are formed from a and b alone. In a ripple chain the
// operands settle long before the carry arrives, so each stage adds only the
// delay of the final AND-OR term to the carry path, and the first stage does
// not have to wait for an XOR of the operands before its carry can form (as
// it would with cout = a&b | (a^b)&cin). This structure and its equations are
// those of the design; writing the gates as operators rather than as
// instances of a particular cell library is this implementation's choice.
//
// Ports: a, b, cin in; sum, cout out. Purely combinational, no clock.
module xoac_fa (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic or_ab;   // OR2 on the operands
  logic and_ab;  // AND2 on the operands

  assign sum    = a ^ b ^ cin;
  assign or_ab  = a | b;
  assign and_ab = a & b;
  assign cout   = and_ab | (or_ab & cin);

endmodule
