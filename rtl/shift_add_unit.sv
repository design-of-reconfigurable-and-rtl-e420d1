// shift_add_unit - shared generator of the 3-bit binary common subexpressions.
//
// Every processing element of a filter multiplies the same input sample x, so
// the multiples of x that a 3-bit coefficient window can ask for are formed
// once, here, and shared: bcs[k] = k * x for k = 0..7. Following the source
// design, only three adders are used; the rest are wires and fixed shifts:
//   bcs[3] = x + 2x          (adder 1)
//   bcs[5] = x + 4x          (adder 2)
//   bcs[7] = 3x + 4x         (adder 3)
//   bcs[2] = 2x, bcs[4] = 4x, bcs[6] = 3x << 1, bcs[0] = 0
// The values are integer multiples (the LSB-aligned form of the source's
// "x + x>>1 + x>>2" terms); the fixed shifts that place them are applied in
// the processing elements.
//
// Interface: x is a signed two's-complement sample; each bcs[k] is signed and
// DATA_W+3 bits wide, so no value overflows. bcs[0] is the constant 0 and
// bcs[1], bcs[2], bcs[4] are x and its fixed shifts: by design they hold no
// logic of their own. Purely combinational.
module shift_add_unit #(
  parameter int unsigned DATA_W = 8
) (
  input  logic signed [DATA_W-1:0] x,
  output logic signed [DATA_W+2:0] bcs [8]
);

  logic signed [DATA_W+2:0] x1, x2, x4, x3, x5, x7;

  always_comb begin
    x1 = (DATA_W+3)'(x);
    x2 = x1 <<< 1;
    x4 = x1 <<< 2;
    x3 = x1 + x2;
    x5 = x1 + x4;
    x7 = x3 + x4;
    bcs[0] = '0;
    bcs[1] = x1;
    bcs[2] = x2;
    bcs[3] = x3;
    bcs[4] = x4;
    bcs[5] = x5;
    bcs[6] = x3 <<< 1;
    bcs[7] = x7;
  end

endmodule
