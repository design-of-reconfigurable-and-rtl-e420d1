// tb_psm_pe - self-checking test of the PSM multiplier.
// Random 16-bit sign-magnitude coefficients (|h| < 2^15) are encoded into the
// two LUT rows with fir_pkg::bcse_encode and the product is compared with
// x * h. Also checks the worst case (five operands), zero, negative
// coefficients, and that clearing a mask bit removes exactly that operand.
module tb_psm_pe;
  import fir_pkg::*;
  localparam int unsigned DATA_W = 8;
  logic clk = 0;
  logic signed [DATA_W-1:0] x;
  logic signed [DATA_W+2:0] bcs [8];
  psm_row0_t r0;
  psm_row1_t r1;
  logic signed [DATA_W+18:0] prod;
  int checks = 0, failures = 0;
  int n_five = 0, n_neg = 0, n_masked = 0;

  always_comb for (int k = 0; k < 8; k++) bcs[k] = (DATA_W+3)'(k * int'(x));

  psm_pe #(.DATA_W(DATA_W)) dut (.bcs(bcs), .row0(r0), .row1(r1), .prod(prod));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int popcount5(logic [4:0] m);
    int c = 0;
    for (int i = 0; i < 5; i++) c += m[i];
    return c;
  endfunction

  // Value of operand i (0..4) of an encoded coefficient, times x.
  function automatic int op_value(psm_row0_t a, psm_row1_t b, int i, int xv);
    psm_operand_t o;
    o = (i == 0) ? a.op1 : (i == 1) ? a.op2 : (i == 2) ? b.op3 : (i == 3) ? b.op4 : b.op5;
    return (int'(bcs_pattern(o.code)) * xv * (1 << 15) >>> o.shift) >>> 3;
  endfunction

  initial begin
    int h;
    for (int n = 0; n < 3000; n++) begin
      case (n)
        0: h = 32767;
        1: h = -32767;
        2: h = 0;
        default: h = int'($urandom % 65535) - 32767;
      endcase
      x = (n % 7 == 0) ? -8'sd128 : DATA_W'($urandom);
      {r0, r1} = bcse_encode(h);
      @(posedge clk);
      checks++;
      if (int'(prod) != int'(x) * h) begin
        failures++;
        if (failures < 10) $display("h=%0d x=%0d got %0d exp %0d", h, x, prod, int'(x) * h);
      end
      if (popcount5(r0.mask) == 5) n_five++;
      if (h < 0) n_neg++;
      // Drop one used operand through its mask bit.
      for (int i = 0; i < 5; i++) begin
        if (r0.mask[4-i] && (n % 5 == i)) begin
          automatic int part = op_value(r0, r1, i, int'(x));
          r0.mask[4-i] = 1'b0;
          @(posedge clk);
          checks++;
          n_masked++;
          if (int'(prod) != int'(x) * h - (h < 0 ? -part : part)) begin
            failures++;
            if (failures < 10) $display("mask op%0d h=%0d x=%0d got %0d", i+1, h, x, prod);
          end
        end
      end
    end
    checks++;
    if (n_five == 0 || n_neg == 0 || n_masked == 0) begin
      failures++;
      $display("coverage: five=%0d neg=%0d masked=%0d", n_five, n_neg, n_masked);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
