// safa_pkg: shared type for the family of simplified approximate full
// adders (SAFA1E..SAFA4E). A compressor or an array built from these cells
// uses safa_kind_e to say which approximate cell sits in each position.
// The four cell types are the ones the design proposes; the encoding of
// the enum is this implementation's own choice.
package safa_pkg;

  typedef enum logic [1:0] {
    SAFA1E = 2'd0,  // exact carry, sum wrong only for 111
    SAFA2E = 2'd1,  // carry = A, five-gate sum
    SAFA3E = 2'd2,  // carry = A, three-gate sum
    SAFA4E = 2'd3   // carry = A, sum = B | C
  } safa_kind_e;

endpackage
