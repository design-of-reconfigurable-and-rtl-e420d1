// fir_pkg - types and helpers shared by the reconfigurable FIR filters.
//
// The programmable-shift (PSM) filter keeps each coefficient as two 18-bit
// look-up-table rows, "SDDDDXXDDDDXXMMMML" and "DDDDXXDDDDXXDDDDXX": a sign
// bit S, up to five operands made of a 4-bit shift DDDD and a 2-bit code XX
// naming a binary common subexpression (BCS), and a 5-bit operand mask
// MMMML. The row layout and the code values follow the source design; the
// meaning of the mask bits and of the shift count are this design's reading
// (see psm_pe).
//
// bcse_encode() turns a signed coefficient into the two rows. It stands in
// for the offline pre-analysis step: it scans the 15-bit magnitude from the
// MSB and takes each 1 with the two bits below it as one operand (a greedy
// 3-bit window), which needs at most five operands for 15 bits. It is used
// by testbenches; a design flow would run the same rule at design time.
package fir_pkg;

  // 2-bit BCS codes of the PSM look-up table, written with the leading
  // term x normalised to the MSB of a 3-bit window:
  //   01 -> x                 (pattern 100)
  //   10 -> x + x>>1          (pattern 110)
  //   11 -> x + x>>2          (pattern 101)
  //   00 -> x + x>>1 + x>>2   (pattern 111)
  typedef enum logic [1:0] {
    BCS_111 = 2'b00,
    BCS_100 = 2'b01,
    BCS_110 = 2'b10,
    BCS_101 = 2'b11
  } bcs_code_e;

  localparam int unsigned PSM_ROW_W = 18;
  localparam int unsigned PSM_OPS   = 5;
  localparam int unsigned PSM_MAG_W = 15;   // magnitude bits of a 16-bit sign-magnitude coefficient

  typedef struct packed {
    logic [3:0] shift;   // DDDD: right shift of the operand, counted from the magnitude MSB
    bcs_code_e  code;    // XX
  } psm_operand_t;

  // Row 0: S DDDDXX DDDDXX MMMML
  typedef struct packed {
    logic         sign;
    psm_operand_t op1;
    psm_operand_t op2;
    logic [4:0]   mask;  // mask[4] enables op1 ... mask[0] (the L bit) enables op5
  } psm_row0_t;

  // Row 1: DDDDXX DDDDXX DDDDXX
  typedef struct packed {
    psm_operand_t op3;
    psm_operand_t op4;
    psm_operand_t op5;
  } psm_row1_t;

  // 3-bit window value (times x) selected by a code; the shared shift-and-add
  // unit provides each of them.
  function automatic int unsigned bcs_pattern(bcs_code_e c);
    case (c)
      BCS_100: return 4;
      BCS_110: return 6;
      BCS_101: return 5;
      default: return 7;
    endcase
  endfunction

  // Greedy 3-bit-window encoder; h must satisfy |h| < 2**15.
  function automatic logic [2*PSM_ROW_W-1:0] bcse_encode(int h);
    psm_row0_t    r0;
    psm_row1_t    r1;
    psm_operand_t ops [PSM_OPS];
    logic [4:0]   mask;
    int unsigned  mag;
    int           p;
    int           n;
    logic         b1, b0;
    mag  = (h < 0) ? -h : h;
    mask = '0;
    n    = 0;
    for (int i = 0; i < PSM_OPS; i++) ops[i] = '{shift: 4'd0, code: BCS_100};
    p = PSM_MAG_W - 1;
    while (p >= 0) begin
      if (mag[p] && n < PSM_OPS) begin
        b1 = (p >= 1) ? mag[p-1] : 1'b0;
        b0 = (p >= 2) ? mag[p-2] : 1'b0;
        ops[n].shift = 4'(PSM_MAG_W - 1 - p);
        case ({b1, b0})
          2'b00:   ops[n].code = BCS_100;
          2'b10:   ops[n].code = BCS_110;
          2'b01:   ops[n].code = BCS_101;
          default: ops[n].code = BCS_111;
        endcase
        mask[4-n] = 1'b1;
        n++;
        p -= 3;
      end else begin
        p -= 1;
      end
    end
    r0 = '{sign: (h < 0), op1: ops[0], op2: ops[1], mask: mask};
    r1 = '{op3: ops[2], op4: ops[3], op5: ops[4]};
    return {r0, r1};
  endfunction

endpackage
