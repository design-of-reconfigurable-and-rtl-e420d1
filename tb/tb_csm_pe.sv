// tb_csm_pe - self-checking test of the CSM multiplier.
// Two instances: the 8-bit coefficient case (two 8:1 muxes and one 4:1 mux)
// and the 9-bit case used by the FFA middle sub-filter (three 8:1 muxes).
// Every coefficient is tried against random signed samples, including the
// worst-case all-ones coefficient, and compared with x * h.
module tb_csm_pe;
  localparam int unsigned DATA_W = 8;
  logic clk = 0;
  logic signed [DATA_W-1:0] x;
  logic signed [DATA_W+2:0] bcs [8];
  logic [7:0] c8;
  logic [8:0] c9;
  logic signed [15:0] p8;
  logic signed [16:0] p9;
  int checks = 0, failures = 0;

  // Reference multiples formed directly, independent of shift_add_unit.
  always_comb for (int k = 0; k < 8; k++) bcs[k] = (DATA_W+3)'(k * int'(x));

  csm_pe #(.DATA_W(DATA_W), .COEF_W(8)) dut8 (.bcs(bcs), .coef(c8), .prod(p8));
  csm_pe #(.DATA_W(DATA_W), .COEF_W(9)) dut9 (.bcs(bcs), .coef(c9), .prod(p9));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int h = 0; h < 512; h++) begin
      for (int t = 0; t < 6; t++) begin
        x  = (t == 0) ? -8'sd128 : (t == 1) ? 8'sd127 : DATA_W'($urandom);
        c8 = 8'(h);
        c9 = 9'(h);
        @(posedge clk);
        if (h < 256) begin
          checks++;
          if (int'(p8) != int'(x) * h) begin
            failures++;
            if (failures < 10) $display("8-bit h=%0d x=%0d got %0d", h, x, p8);
          end
        end
        checks++;
        if (int'(p9) != int'(x) * h) begin
          failures++;
          if (failures < 10) $display("9-bit h=%0d x=%0d got %0d", h, x, p9);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
