// safa1e: simplified approximate full adder, type 1E.
//
// The carry is the exact majority function, carry = A.B + C.(A + B),
// built from two ORs and two ANDs. The sum is taken from the carry with
// no XOR gate at all: sum = NOT(carry) AND (A + B + C). That is the
// correct sum bit for every input except 111, where it gives 0 instead
// of 1, so the 2-bit result {carry,sum} reads 2 instead of 3 (error
// distance -1, one error in eight cases). The gate network follows the
// published schematic: OR(A,B), AND(that,C), AND(A,B), OR -> carry;
// OR(A,B,C), inverter on carry, AND -> sum (seven gates).
//
// Interface: three 1-bit inputs a, b, c; outputs sum and carry.
// Timing: purely combinational, no clock or reset.
module safa1e (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);

  logic a_or_b;      // OR(A,B)
  logic c_and_aorb;  // AND(C, A+B)
  logic a_and_b;     // AND(A,B)
  logic any_one;     // OR(A,B,C)

  assign a_or_b     = a | b;
  assign c_and_aorb = c & a_or_b;
  assign a_and_b    = a & b;
  assign carry      = a_and_b | c_and_aorb;
  assign any_one    = a | b | c;
  assign sum        = ~carry & any_one;

endmodule
