// coef_lut - coefficient look-up table of a reconfigurable filter.
//
// A register array of DEPTH words of WIDTH bits. While we (program_en) is
// high, wdata is written into word waddr at the rising clock edge, one word
// per clock; every word is visible at once on `words`, because each
// processing element reads its own coefficient every cycle. Reprogramming
// takes effect from the clock after the write, while the filter keeps
// running: this is what makes the filters reconfigurable. The source design
// names the LUT and what it stores; the register-array form, the write port
// and the synchronous active-high reset that clears every word are this
// design's choices. A write to an address at or beyond DEPTH is ignored.
module coef_lut #(
  parameter int unsigned DEPTH = 72,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] words [DEPTH]
);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < DEPTH; i++) words[i] <= '0;
    end else if (we && 32'(waddr) < DEPTH) begin
      words[waddr] <= wdata;
    end
  end

endmodule
