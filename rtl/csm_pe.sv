// csm_pe - constant-shift-method (CSM) coefficient multiplier.
//
// Computes prod = coef * x without a multiplier. The unsigned coefficient is
// cut into 3-bit groups starting at the MSB; a last group of fewer bits is
// left at the LSB end. Each group is the select of one multiplexer over the
// shared multiples bcs[0..7] = 0..7 times x (an 8:1 mux for a 3-bit group,
// a 4:1 mux for a 2-bit group, a 2:1 mux for a 1-bit group). Because the
// group boundaries never move, the shift that places each mux output is a
// constant and is hardwired; a final adder sums the shifted terms.
//
// For the source design's 8-bit case this is two 8:1 muxes on bits [7:5] and
// [4:2] and one 4:1 mux on bits [1:0]:
//   prod = (bcs[c[7:5]] << 5) + (bcs[c[4:2]] << 2) + bcs[c[1:0]]
// which is the source's h = 2^-1 (A + 2^-3 B + 2^-6 C) for a fractional
// coefficient 0.c7..c0, scaled by 2^8 so that no product bit is dropped.
// The integer scaling, the sign handling (signed x, unsigned coefficient)
// and the generalisation to any COEF_W are this design's choices.
//
// Interface: bcs from shift_add_unit, coef from the LUT, prod signed and
// DATA_W+COEF_W bits wide (exact). Purely combinational.
module csm_pe #(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned COEF_W = 8,
  localparam int unsigned PROD_W = DATA_W + COEF_W,
  localparam int unsigned NGRP   = (COEF_W + 2) / 3
) (
  input  logic signed [DATA_W+2:0] bcs [8],
  input  logic        [COEF_W-1:0] coef,
  output logic signed [PROD_W-1:0] prod
);

  // Multiplexer unit: one mux per coefficient group.
  logic signed [DATA_W+2:0] sel_val [NGRP];

  for (genvar g = 0; g < NGRP; g++) begin : g_grp
    localparam int HI = int'(COEF_W) - 1 - 3*g;
    localparam int LO = (HI - 2 > 0) ? HI - 2 : 0;
    localparam int GW = HI - LO + 1;      // 3, or 1..3 for the last group
    logic [GW-1:0] sel;
    assign sel = coef[HI:LO];
    always_comb sel_val[g] = bcs[3'(sel)];
  end

  // Final shifter unit (hardwired) and final adder unit.
  always_comb begin
    prod = '0;
    for (int g = 0; g < NGRP; g++) begin
      prod += PROD_W'(sel_val[g]) <<< ((int'(COEF_W) - 3 - 3*g > 0) ? (int'(COEF_W) - 3 - 3*g) : 0);
    end
  end

endmodule
