// safa_ref_pkg: reference truth tables of the four simplified approximate
// full adders, for the testbenches. Each table is indexed by the input
// combination {A,B,C} (0..7); bit i of CY_TAB / S_TAB is the expected
// carry / sum for input i, and ED_TAB[i] the expected error distance
// (approximate value 2*carry+sum minus the exact A+B+C). The numbers are
// the published truth tables, entered by hand, so the checks do not
// depend on the RTL equations.
package safa_ref_pkg;

  localparam logic [3:0][7:0] CY_TAB = '{
    8'b1111_0000,   // [3] SAFA4E
    8'b1111_0000,   // [2] SAFA3E
    8'b1111_0000,   // [1] SAFA2E
    8'b1110_1000    // [0] SAFA1E
  };

  localparam logic [3:0][7:0] S_TAB = '{
    8'b1110_1110,   // [3] SAFA4E
    8'b0000_1110,   // [2] SAFA3E
    8'b1000_1110,   // [1] SAFA2E
    8'b0001_0110    // [0] SAFA1E
  };

  // ED per cell type, input 0..7
  localparam int ED_TAB [4][8] = '{
    '{0, 0, 0,  0,  0, 0, 0, -1},   // SAFA1E
    '{0, 0, 0, -1, +1, 0, 0,  0},   // SAFA2E
    '{0, 0, 0, -1, +1, 0, 0, -1},   // SAFA3E
    '{0, 0, 0, -1, +1, +1, +1, 0}   // SAFA4E
  };

  // Reference approximate full adder of cell type k: returns {carry,sum}.
  function automatic logic [1:0] ref_fa(int k, logic a, logic b, logic c);
    logic [2:0] i;
    i = {a, b, c};
    return {CY_TAB[k][i], S_TAB[k][i]};
  endfunction

endpackage
