// fir_top - the three reconfigurable FIR filters of this design, side by side.
//
// The design offers two multiplier-less ways to build a reconfigurable FIR
// filter and one way to run it two samples per clock:
//  * csm_fir: constant shift method, coefficients stored as they are;
//  * psm_fir: programmable shift method, coefficients stored as pre-analysed
//    common-subexpression operands;
//  * ffa2_fir: two-parallel fast FIR filter made of three CSM sub-filters.
// They are independent filters with their own coefficient-write and data
// ports; they share only the clock and the synchronous active-high reset.
// Port groups are prefixed csm_, psm_ and ffa_; see each module for the
// meaning and timing of its ports. All three default to N_TAPS = 72 taps and
// 8-bit signed samples; CSM/FFA coefficients are 8-bit unsigned, PSM
// coefficients 16-bit sign-magnitude.
module fir_top
  import fir_pkg::*;
#(
  parameter int unsigned N_TAPS = 72,
  parameter int unsigned DATA_W = 8,
  parameter int unsigned COEF_W = 8,
  localparam int unsigned AW      = (N_TAPS > 1) ? $clog2(N_TAPS) : 1,
  localparam int unsigned LGN     = (N_TAPS > 1) ? $clog2(N_TAPS) : 0,
  localparam int unsigned KW      = (N_TAPS / 2 > 1) ? $clog2(N_TAPS / 2) : 1,
  localparam int unsigned LGM     = (N_TAPS / 2 > 1) ? $clog2(N_TAPS / 2) : 0,
  localparam int unsigned CSM_OUT_W = DATA_W + COEF_W + LGN,
  localparam int unsigned PSM_OUT_W = DATA_W + 19 + LGN,
  localparam int unsigned FFA_OUT_W = DATA_W + COEF_W + 2 + LGM
) (
  input  logic                        clk,
  input  logic                        rst,
  // constant shift method filter
  input  logic                        csm_program_en,
  input  logic [AW-1:0]               csm_mult_address,
  input  logic [COEF_W-1:0]           csm_filter_coeff,
  input  logic signed [DATA_W-1:0]    csm_data_in,
  output logic signed [CSM_OUT_W-1:0] csm_data_out,
  // programmable shift method filter
  input  logic                        psm_program_en,
  input  logic [AW:0]                 psm_mult_address,
  input  logic [PSM_ROW_W-1:0]        psm_filter_coeff,
  input  logic signed [DATA_W-1:0]    psm_data_in,
  output logic signed [PSM_OUT_W-1:0] psm_data_out,
  // two-parallel fast FIR filter
  input  logic                        ffa_program_en,
  input  logic [KW-1:0]               ffa_mult_address,
  input  logic [2*COEF_W-1:0]         ffa_filter_coeff,
  input  logic signed [DATA_W-1:0]    ffa_x0,
  input  logic signed [DATA_W-1:0]    ffa_x1,
  output logic signed [FFA_OUT_W-1:0] ffa_y0,
  output logic signed [FFA_OUT_W-1:0] ffa_y1
);

  csm_fir #(.N_TAPS(N_TAPS), .DATA_W(DATA_W), .COEF_W(COEF_W)) u_csm (
    .clk, .rst, .program_en(csm_program_en), .mult_address(csm_mult_address),
    .filter_coeff(csm_filter_coeff), .data_in(csm_data_in), .data_out(csm_data_out)
  );

  psm_fir #(.N_TAPS(N_TAPS), .DATA_W(DATA_W)) u_psm (
    .clk, .rst, .program_en(psm_program_en), .mult_address(psm_mult_address),
    .filter_coeff(psm_filter_coeff), .data_in(psm_data_in), .data_out(psm_data_out)
  );

  ffa2_fir #(.N_TAPS(N_TAPS), .DATA_W(DATA_W), .COEF_W(COEF_W)) u_ffa (
    .clk, .rst, .program_en(ffa_program_en), .mult_address(ffa_mult_address),
    .filter_coeff(ffa_filter_coeff), .x0(ffa_x0), .x1(ffa_x1), .y0(ffa_y0), .y1(ffa_y1)
  );

endmodule
