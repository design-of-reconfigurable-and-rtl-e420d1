// csm_fir - reconfigurable FIR filter built on the constant shift method.
//
// A transposed-form N_TAPS-tap filter y(n) = sum_k h[k] x(n-k) with no
// multipliers. Each new sample x(n) goes to one shared shift-and-add unit
// that forms 0..7 times x; every processing element (csm_pe) then builds its
// coefficient product from those eight values with muxes driven by the
// coefficient bits, fixed shifts and a small adder, and the products are
// accumulated along the register/adder chain (tap_chain). The coefficients
// live in a LUT (coef_lut) that can be rewritten at any time through
// program_en / mult_address / filter_coeff, one coefficient per clock, so
// the same hardware serves any coefficient set of COEF_W bits. The overall
// structure (shared shift-and-add unit, PEs, delay/adder chain, LUT) and
// the port names follow the source design.
//
// Interface and timing:
//  * Write: when program_en is high at a rising edge, filter_coeff (unsigned)
//    is stored at mult_address. Address a holds h[N_TAPS-1-a], so address 0
//    feeds PE I at the far end of the chain (the order in which the source's
//    simulation loads coefficients). New coefficients act from the next clock.
//  * Data: one signed sample per clock on data_in; data_out (signed,
//    registered) shows y(n) after the rising edge that sampled x(n).
//  * rst: synchronous, active high; clears the chain and the LUT.
// Signed two's-complement data, the synchronous reset and the registered
// output are this design's choices.
module csm_fir #(
  parameter int unsigned N_TAPS = 72,
  parameter int unsigned DATA_W = 8,
  parameter int unsigned COEF_W = 8,
  localparam int unsigned AW     = (N_TAPS > 1) ? $clog2(N_TAPS) : 1,
  localparam int unsigned PROD_W = DATA_W + COEF_W,
  localparam int unsigned OUT_W  = PROD_W + ((N_TAPS > 1) ? $clog2(N_TAPS) : 0)
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     program_en,
  input  logic [AW-1:0]            mult_address,
  input  logic [COEF_W-1:0]        filter_coeff,
  input  logic signed [DATA_W-1:0] data_in,
  output logic signed [OUT_W-1:0]  data_out
);

  logic        [COEF_W-1:0] coef [N_TAPS];
  logic signed [DATA_W+2:0] bcs  [8];
  logic signed [PROD_W-1:0] prod [N_TAPS];

  coef_lut #(.DEPTH(N_TAPS), .WIDTH(COEF_W)) u_lut (
    .clk, .rst, .we(program_en), .waddr(mult_address), .wdata(filter_coeff), .words(coef)
  );

  shift_add_unit #(.DATA_W(DATA_W)) u_sau (.x(data_in), .bcs(bcs));

  for (genvar j = 0; j < N_TAPS; j++) begin : g_pe
    csm_pe #(.DATA_W(DATA_W), .COEF_W(COEF_W)) u_pe (.bcs(bcs), .coef(coef[j]), .prod(prod[j]));
  end

  tap_chain #(.N_TAPS(N_TAPS), .PROD_W(PROD_W)) u_chain (.clk, .rst, .prod(prod), .y(data_out));

  // A coefficient write must name an existing tap.
  a_addr_in_range: assert property (@(posedge clk) disable iff (rst)
    program_en |-> (32'(mult_address) < N_TAPS));

endmodule
