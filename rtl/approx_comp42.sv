// approx_comp42: approximate 4:2 compressor built from two simplified
// approximate full adders.
//
// A 4:2 compressor reduces four partial-product bits of one column (x[0]
// to x[3]) plus a carry-in from the column to its right (cin) to a sum
// bit of weight 1, a carry bit of weight 2, and a carry-out cout of
// weight 2 that is passed to the column on the left. Exactly,
//   x[0] + x[1] + x[2] + x[3] + cin = sum + 2*(carry + cout).
// This block uses the usual two-adder arrangement: the first full adder
// adds x[0], x[1], x[2] into a partial sum s1 and cout; the second adds
// s1, x[3] and cin into sum and carry. cout does not depend on cin, so
// there is no ripple along a row of compressors.
//
// The full adders are cells of the approximate family (safa_pkg); STAGE1
// and STAGE2 pick the cell for each position and default to SAFA1E,
// whose carry is exact and whose sum errs only when all three inputs
// are 1. The compressor's use of the approximate cells follows the
// design; the two-adder structure and the way operands are mapped onto
// the cells' A, B and C inputs (A = x[0] in the first cell, A = s1 in
// the second) are this implementation's choice.
//
// Interface: x[3:0], cin in; sum, carry, cout out. Purely combinational.
module approx_comp42
  import safa_pkg::*;
#(
  parameter safa_kind_e STAGE1 = SAFA1E,
  parameter safa_kind_e STAGE2 = SAFA1E
) (
  input  logic [3:0] x,
  input  logic       cin,
  output logic       sum,
  output logic       carry,
  output logic       cout
);

  logic s1;  // partial sum of x[0..2]

  safa_cell #(.KIND(STAGE1)) u_fa1 (
    .a    (x[0]),
    .b    (x[1]),
    .c    (x[2]),
    .sum  (s1),
    .carry(cout)
  );

  safa_cell #(.KIND(STAGE2)) u_fa2 (
    .a    (s1),
    .b    (x[3]),
    .c    (cin),
    .sum  (sum),
    .carry(carry)
  );

endmodule
