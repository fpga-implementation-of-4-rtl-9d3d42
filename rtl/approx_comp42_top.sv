// approx_comp42_top: the four approximate 4:2 compressors side by side.
//
// The design proposes four simplified approximate full adders (SAFA1E,
// SAFA2E, SAFA3E, SAFA4E) that trade accuracy for gates, and a 4:2
// approximate compressor built from them. This top instantiates one
// compressor per cell type, all fed from the same column inputs, so
// their outputs can be compared on the same data: output bit k of sum,
// carry and cout belongs to the compressor made of cell type k
// (0 = SAFA1E ... 3 = SAFA4E). Feeding all four from one input set is
// this implementation's choice; it is how the variants are evaluated
// against each other, not a circuit the design connects this way.
//
// In the SAFA2E..SAFA4E compressors cout is x[0] itself, because those
// cells pass input A straight to their carry; those three output bits are
// plain wires by design.
//
// Interface: x[3:0], cin in; sum[3:0], carry[3:0], cout[3:0] out.
// Purely combinational, no clock or reset.
module approx_comp42_top
  import safa_pkg::*;
(
  input  logic [3:0] x,
  input  logic       cin,
  output logic [3:0] sum,
  output logic [3:0] carry,
  output logic [3:0] cout
);

  localparam safa_kind_e KINDS [4] = '{SAFA1E, SAFA2E, SAFA3E, SAFA4E};

  for (genvar k = 0; k < 4; k++) begin : g_comp
    approx_comp42 #(.STAGE1(KINDS[k]), .STAGE2(KINDS[k])) u_comp (
      .x    (x),
      .cin  (cin),
      .sum  (sum[k]),
      .carry(carry[k]),
      .cout (cout[k])
    );
  end

endmodule
