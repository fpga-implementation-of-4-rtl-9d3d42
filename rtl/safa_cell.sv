// safa_cell: one approximate full adder whose type is chosen at
// elaboration time by the KIND parameter (see safa_pkg). It only selects
// which of safa1e..safa4e is instantiated, so a structure built from
// full adders (a compressor, a ripple row) can be re-targeted to any
// cell of the family by changing a parameter. This wrapper is an
// implementation convenience, not a block of the design itself.
//
// Interface: a, b, c in; sum, carry out. Purely combinational.
module safa_cell
  import safa_pkg::*;
#(
  parameter safa_kind_e KIND = SAFA1E
) (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);

  generate
    case (KIND)
      SAFA1E:  begin : g_1e safa1e u_fa (.a, .b, .c, .sum, .carry); end
      SAFA2E:  begin : g_2e safa2e u_fa (.a, .b, .c, .sum, .carry); end
      SAFA3E:  begin : g_3e safa3e u_fa (.a, .b, .c, .sum, .carry); end
      default: begin : g_4e safa4e u_fa (.a, .b, .c, .sum, .carry); end
    endcase
  endgenerate

endmodule
