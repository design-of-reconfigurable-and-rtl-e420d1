// tb_table1_sizes - runs the CSM and PSM filters at every filter length of
// the published comparison (8, 16, 24, 48 and 72 taps), one size_run each,
// with random coefficient sets and samples checked against a direct-form
// convolution. Passes when every size reports no failure.
module tb_table1_sizes;
  logic clk = 0, rst = 1;
  logic done [5];
  int   chk [5], fail [5];
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  size_run #(.N_TAPS(8))  u8  (.clk, .rst, .done(done[0]), .checks(chk[0]), .failures(fail[0]));
  size_run #(.N_TAPS(16)) u16 (.clk, .rst, .done(done[1]), .checks(chk[1]), .failures(fail[1]));
  size_run #(.N_TAPS(24)) u24 (.clk, .rst, .done(done[2]), .checks(chk[2]), .failures(fail[2]));
  size_run #(.N_TAPS(48)) u48 (.clk, .rst, .done(done[3]), .checks(chk[3]), .failures(fail[3]));
  size_run #(.N_TAPS(72)) u72 (.clk, .rst, .done(done[4]), .checks(chk[4]), .failures(fail[4]));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    wait (done[0] && done[1] && done[2] && done[3] && done[4]);
    for (int i = 0; i < 5; i++) begin
      $display("size %0d: checks=%0d failures=%0d", i, chk[i], fail[i]);
      checks += chk[i];
      failures += fail[i];
      if (chk[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
