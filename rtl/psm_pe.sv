// psm_pe - programmable-shift-method (PSM) coefficient multiplier.
//
// The coefficient arrives already rewritten as up to five operands (see
// fir_pkg): each operand is a 2-bit code naming one 3-bit binary common
// subexpression of x and a 4-bit shift DDDD. For each operand a 4:1
// multiplexer picks x, x+x>>1, x+x>>2 or x+x>>1+x>>2 from the shared
// shift-and-add unit, a programmable shifter (PS) shifts it right by DDDD,
// and a final adder sums the five results; the sign bit S then negates the
// sum. Operands whose mask bit (MMMML) is 0 are forced to zero at the mux, so
// a coefficient with fewer than five operands causes no switching in the
// unused branches. The mux/PS/adder structure, the row format and the codes
// follow the source design.
//
// This design's reading of the parts the source leaves open:
//  * The coefficient is sign-magnitude with a 15-bit magnitude M (h = +/-M),
//    and DDDD counts the right shift of the operand's leading bit from bit 14
//    of M: an operand with code pattern p (a 3-bit value 4..7) and shift D
//    contributes p * 2^(12-D) * x. To keep every bit, the shifters work on
//    x scaled by 2^15 and the sum is shifted back by 3 (exact whenever the
//    operands lie inside the 15-bit magnitude, as the encoder guarantees).
//  * mask[4] enables operand 1 ... mask[0] (the "L" bit) enables operand 5.
//
// Interface: bcs from shift_add_unit, row0/row1 from the LUT, prod signed
// and DATA_W+19 bits wide (wide enough for any row contents). Combinational.
module psm_pe
  import fir_pkg::*;
#(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned N_OPS  = 5,
  localparam int unsigned PROD_W = DATA_W + 19,
  localparam int unsigned SH_W   = DATA_W + 18,   // one shifted operand
  localparam int unsigned SUM_W  = DATA_W + 21    // sum of five operands
) (
  input  logic signed [DATA_W+2:0] bcs [8],
  input  psm_row0_t                row0,
  input  psm_row1_t                row1,
  output logic signed [PROD_W-1:0] prod
);

  psm_operand_t             ops     [5];
  logic                     en      [5];
  logic signed [DATA_W+2:0] mux_out [5];
  logic signed [SH_W-1:0]   ps_out  [5];
  logic signed [SUM_W-1:0]  sum;
  logic signed [SUM_W-4:0]  mag_x;

  always_comb begin
    ops = '{row0.op1, row0.op2, row1.op3, row1.op4, row1.op5};
    for (int i = 0; i < 5; i++) en[i] = row0.mask[4-i] && (i < int'(N_OPS));

    sum = '0;
    for (int i = 0; i < 5; i++) begin
      // Multiplexer: BCS selected by the operand code, zero when masked.
      if (!en[i])                     mux_out[i] = '0;
      else if (ops[i].code == BCS_100) mux_out[i] = bcs[4];
      else if (ops[i].code == BCS_110) mux_out[i] = bcs[6];
      else if (ops[i].code == BCS_101) mux_out[i] = bcs[5];
      else                             mux_out[i] = bcs[7];
      // Programmable shifter.
      ps_out[i] = $signed({mux_out[i], 15'b0}) >>> ops[i].shift;
      sum += SUM_W'(ps_out[i]);
    end

    // Final adder result back to integer scale, then the sign bit.
    mag_x = (SUM_W-3)'(sum >>> 3);
    prod  = row0.sign ? -PROD_W'(mag_x) : PROD_W'(mag_x);
  end

endmodule
