// ffa2_fir - two-parallel fast FIR (2x2 FFA) filter.
//
// Processes two samples per clock, x(2k) on x0 and x(2k+1) on x1, and
// produces y(2k) on y0 and y(2k+1) on y1, for the N_TAPS-tap filter
// y(n) = sum_i h(i) x(n-i). With the polyphase split H0 = even taps, H1 =
// odd taps, X0/X1 = even/odd samples, the fast FIR algorithm needs three
// sub-filters of N_TAPS/2 taps instead of four:
//   y(2k)   = H0 X0 + D(H1 X1)                       (D = one clock here)
//   y(2k+1) = (H0 + H1)(X0 + X1) - H0 X0 - H1 X1
// so the hardware is one pre-adder (x0 + x1), the sub-filters H0, H0+H1 and
// H1, one register D on the H1 output and three post-adders. That structure
// follows the source design.
//
// This design's choices: each sub-filter is a reconfigurable csm_fir (the
// H0+H1 sub-filter one bit wider in data and coefficient); coefficients are
// written in pairs, and the sum coefficient h(2k)+h(2k+1) for the middle
// sub-filter is formed by one adder at write time; the outputs are
// registered.
//
// Interface and timing:
//  * Write: when program_en is high at a rising edge, filter_coeff =
//    {h(2k+1), h(2k)} (unsigned, COEF_W bits each) is stored for sub-filter
//    tap k = mult_address. Acts from the next clock.
//  * Data: one pair (x0, x1) per clock; (y0, y1) for that pair appear after
//    the second rising edge (two clocks of latency).
//  * rst: synchronous, active high; clears all state and coefficients.
module ffa2_fir #(
  parameter int unsigned N_TAPS = 72,     // even
  parameter int unsigned DATA_W = 8,
  parameter int unsigned COEF_W = 8,
  localparam int unsigned M     = N_TAPS / 2,
  localparam int unsigned KW    = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned LGM   = (M > 1) ? $clog2(M) : 0,
  localparam int unsigned SUB_W = DATA_W + COEF_W + LGM,        // H0, H1 outputs
  localparam int unsigned MID_W = DATA_W + COEF_W + 2 + LGM,    // H0+H1 output
  localparam int unsigned OUT_W = MID_W
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      program_en,
  input  logic [KW-1:0]             mult_address,
  input  logic [2*COEF_W-1:0]       filter_coeff,
  input  logic signed [DATA_W-1:0]  x0,
  input  logic signed [DATA_W-1:0]  x1,
  output logic signed [OUT_W-1:0]   y0,
  output logic signed [OUT_W-1:0]   y1
);

  logic [COEF_W-1:0]        h_even, h_odd;
  logic [COEF_W:0]          h_sum;
  logic [KW-1:0]            sub_addr;
  logic signed [DATA_W:0]   x_sum;
  logic signed [SUB_W-1:0]  f0, f1;
  logic signed [MID_W-1:0]  f01;
  logic signed [SUB_W-1:0]  f1_d;

  // Coefficient pair and the H0+H1 coefficient (one adder); sub-filter
  // address k' holds tap M-1-k' (see csm_fir).
  always_comb begin
    {h_odd, h_even} = filter_coeff;
    h_sum    = {1'b0, h_even} + {1'b0, h_odd};
    sub_addr = KW'(M - 1 - int'(mult_address));
  end

  // Pre-adder.
  assign x_sum = (DATA_W+1)'(x0) + (DATA_W+1)'(x1);

  csm_fir #(.N_TAPS(M), .DATA_W(DATA_W), .COEF_W(COEF_W)) u_h0 (
    .clk, .rst, .program_en, .mult_address(sub_addr), .filter_coeff(h_even),
    .data_in(x0), .data_out(f0)
  );

  csm_fir #(.N_TAPS(M), .DATA_W(DATA_W+1), .COEF_W(COEF_W+1)) u_h01 (
    .clk, .rst, .program_en, .mult_address(sub_addr), .filter_coeff(h_sum),
    .data_in(x_sum), .data_out(f01)
  );

  csm_fir #(.N_TAPS(M), .DATA_W(DATA_W), .COEF_W(COEF_W)) u_h1 (
    .clk, .rst, .program_en, .mult_address(sub_addr), .filter_coeff(h_odd),
    .data_in(x1), .data_out(f1)
  );

  // Delay element D and post-adders.
  always_ff @(posedge clk) begin
    if (rst) begin
      f1_d <= '0;
      y0   <= '0;
      y1   <= '0;
    end else begin
      f1_d <= f1;
      y0   <= OUT_W'(f0) + OUT_W'(f1_d);
      y1   <= f01 - OUT_W'(f0) - OUT_W'(f1);
    end
  end

  a_addr_in_range: assert property (@(posedge clk) disable iff (rst)
    program_en |-> (32'(mult_address) < M));

endmodule
