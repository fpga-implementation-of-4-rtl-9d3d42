// safa3e: simplified approximate full adder, type 3E.
//
// The carry output is operand A wired straight through. The sum uses
// three gates: sum = NOT(A).(B + C) (inverter on A, OR(B,C), AND), as in
// the published schematic. Against an exact full adder the 2-bit result
// {carry,sum} is wrong for three of eight inputs: 011 (-1), 100 (+1)
// and 111 (-1).
//
// Interface: three 1-bit inputs a, b, c; outputs sum and carry.
// Timing: purely combinational, no clock or reset.
module safa3e (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);

  logic a_n;     // NOT(A)
  logic b_or_c;  // OR(B,C)

  assign a_n    = ~a;
  assign b_or_c = b | c;
  assign sum    = a_n & b_or_c;
  assign carry  = a;

endmodule
