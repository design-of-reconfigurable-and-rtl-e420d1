// tb_shift_add_unit - self-checking test of the shared BCS generator.
// Drives every 8-bit signed sample and checks bcs[k] == k * x for k = 0..7
// against integer arithmetic.
module tb_shift_add_unit;
  localparam int unsigned DATA_W = 8;
  logic clk = 0;
  logic signed [DATA_W-1:0] x;
  logic signed [DATA_W+2:0] bcs [8];
  int checks = 0, failures = 0;

  shift_add_unit #(.DATA_W(DATA_W)) dut (.x(x), .bcs(bcs));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -(1 << (DATA_W-1)); v < (1 << (DATA_W-1)); v++) begin
      x = DATA_W'(v);
      @(posedge clk);
      for (int k = 0; k < 8; k++) begin
        checks++;
        if (int'(bcs[k]) != k * v) begin
          failures++;
          if (failures < 10) $display("x=%0d k=%0d got %0d", v, k, bcs[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
