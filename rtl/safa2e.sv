// safa2e: simplified approximate full adder, type 2E.
//
// The carry output is operand A wired straight through (no gate on the
// carry path). The sum is built from five basic gates and no XOR:
// sum = NOT(A).(B + C) + B.C, as in the published schematic (inverter on
// A, OR(B,C), AND of the two, AND(B,C), final OR). Against an exact full
// adder the 2-bit result {carry,sum} is wrong for two of eight inputs:
// 011 reads 1 instead of 2 (error distance -1) and 100 reads 2 instead
// of 1 (+1).
//
// Interface: three 1-bit inputs a, b, c; outputs sum and carry.
// Timing: purely combinational, no clock or reset.
module safa2e (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);

  logic a_n;         // NOT(A)
  logic b_or_c;      // OR(B,C)
  logic an_and_boc;  // AND(NOT A, B+C)
  logic b_and_c;     // AND(B,C)

  assign a_n        = ~a;
  assign b_or_c     = b | c;
  assign an_and_boc = a_n & b_or_c;
  assign b_and_c    = b & c;
  assign sum        = an_and_boc | b_and_c;
  assign carry      = a;

endmodule
