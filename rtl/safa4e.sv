// safa4e: simplified approximate full adder, type 4E.
//
// The cheapest cell of the family: one 2-input OR gate. The carry output
// is operand A wired straight through and the sum is B + C, as in the
// published schematic. Against an exact full adder the 2-bit result
// {carry,sum} is wrong for four of eight inputs: 011 (-1), 100 (+1),
// 101 (+1) and 110 (+1).
//
// Interface: three 1-bit inputs a, b, c; outputs sum and carry.
// Timing: purely combinational, no clock or reset.
module safa4e (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);

  assign sum   = b | c;
  assign carry = a;

endmodule
