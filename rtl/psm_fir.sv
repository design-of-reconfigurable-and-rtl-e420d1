// psm_fir - reconfigurable FIR filter built on the programmable shift method.
//
// Same transposed-form structure as csm_fir: one shared shift-and-add unit,
// one processing element per tap, a register/adder chain. Here each
// processing element (psm_pe) reads a coefficient that was rewritten offline
// into at most five binary-common-subexpression operands (code + shift), so
// only the non-zero parts of the coefficient are added, and the shifts are
// programmable. Each coefficient takes two 18-bit LUT rows (row 0:
// S DDDDXX DDDDXX MMMML, row 1: DDDDXX DDDDXX DDDDXX, see fir_pkg), which
// allows 16-bit sign-magnitude coefficients. Structure, row format and
// operand count follow the source design.
//
// Interface and timing:
//  * Write: when program_en is high at a rising edge, the 18-bit row
//    filter_coeff is stored at mult_address = {a, r}: coefficient index a
//    (a holds h[N_TAPS-1-a], as in csm_fir) and row r. New rows act from
//    the next clock; a coefficient written in two clocks is only consistent
//    once both rows are in.
//  * Data: one signed sample per clock on data_in; data_out (signed,
//    registered) shows y(n) after the rising edge that sampled x(n).
//  * rst: synchronous, active high; clears the chain and the LUT (all
//    operands masked, so every product is zero).
// The {index, row} addressing, signed data, reset and the registered output
// are this design's choices.
module psm_fir
  import fir_pkg::*;
#(
  parameter int unsigned N_TAPS = 72,
  parameter int unsigned DATA_W = 8,
  parameter int unsigned N_OPS  = 5,
  localparam int unsigned TAW    = (N_TAPS > 1) ? $clog2(N_TAPS) : 1,
  localparam int unsigned PROD_W = DATA_W + 19,
  localparam int unsigned OUT_W  = PROD_W + ((N_TAPS > 1) ? $clog2(N_TAPS) : 0)
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     program_en,
  input  logic [TAW:0]             mult_address,
  input  logic [PSM_ROW_W-1:0]     filter_coeff,
  input  logic signed [DATA_W-1:0] data_in,
  output logic signed [OUT_W-1:0]  data_out
);

  logic [PSM_ROW_W-1:0]     rows [2*N_TAPS];
  logic signed [DATA_W+2:0] bcs  [8];
  logic signed [PROD_W-1:0] prod [N_TAPS];

  coef_lut #(.DEPTH(2*N_TAPS), .WIDTH(PSM_ROW_W)) u_lut (
    .clk, .rst, .we(program_en), .waddr(mult_address), .wdata(filter_coeff), .words(rows)
  );

  shift_add_unit #(.DATA_W(DATA_W)) u_sau (.x(data_in), .bcs(bcs));

  for (genvar j = 0; j < N_TAPS; j++) begin : g_pe
    psm_pe #(.DATA_W(DATA_W), .N_OPS(N_OPS)) u_pe (
      .bcs(bcs), .row0(psm_row0_t'(rows[2*j])), .row1(psm_row1_t'(rows[2*j+1])), .prod(prod[j])
    );
  end

  tap_chain #(.N_TAPS(N_TAPS), .PROD_W(PROD_W)) u_chain (.clk, .rst, .prod(prod), .y(data_out));

  a_addr_in_range: assert property (@(posedge clk) disable iff (rst)
    program_en |-> (32'(mult_address) < 2*N_TAPS));

endmodule
