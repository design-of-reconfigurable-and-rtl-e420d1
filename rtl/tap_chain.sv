// tap_chain - register/adder chain of a transposed-form FIR filter.
//
// Takes the N_TAPS products of the current input sample, prod[0] from the
// first processing element (PE I) to prod[N_TAPS-1] from the last (PE n),
// and accumulates them along a chain of registers: stage j holds
// z[j] = z[j-1] + prod[j] from the previous clock. The last stage is the
// filter output, so y = sum_j prod_j(x(n-(N_TAPS-1-j))): PE j applies
// coefficient h[N_TAPS-1-j]. This is the D / adder chain drawn below the
// processing elements in the source's architecture; registering the last
// adder as well (one clock of latency) is this design's choice.
//
// Interface: prod is sampled on each rising clock edge; y changes one edge
// after the product of the newest sample was presented. A synchronous
// active-high reset clears every stage. PROD_W is the product width, ACC_W
// the chain width (wide enough for N_TAPS products without overflow).
module tap_chain #(
  parameter int unsigned N_TAPS = 72,
  parameter int unsigned PROD_W = 16,
  localparam int unsigned ACC_W = PROD_W + ((N_TAPS > 1) ? $clog2(N_TAPS) : 0)
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic signed [PROD_W-1:0] prod [N_TAPS],
  output logic signed [ACC_W-1:0]  y
);

  logic signed [ACC_W-1:0] z [N_TAPS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int j = 0; j < N_TAPS; j++) z[j] <= '0;
    end else begin
      z[0] <= ACC_W'(prod[0]);
      for (int j = 1; j < N_TAPS; j++) z[j] <= z[j-1] + ACC_W'(prod[j]);
    end
  end

  assign y = z[N_TAPS-1];

endmodule
