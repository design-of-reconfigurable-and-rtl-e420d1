// tb_csm_fir - self-checking test of the constant-shift-method FIR filter.
// Part 1 (8 taps): loads the coefficient set of the source's 8-tap example
// (addresses 0..7 = 7,6,8,5,7,2,2,1), streams 1,12,21,31,41,51,61,71,71 and
// expects 1,14,47,104,234,410,669,984,1355, each one clock after its sample.
// Part 2: random signed samples and random coefficient sets, compared with a
// direct-form convolution y(n) = sum h[k] x(n-k); coefficients are rewritten
// while data flows, and checks resume N_TAPS clocks after the last write
// (the chain still holds partial sums made with the old coefficients).
module tb_csm_fir;
  localparam int unsigned N      = 8;
  localparam int unsigned DATA_W = 8;
  localparam int unsigned COEF_W = 8;
  localparam int unsigned AW     = $clog2(N);
  logic clk = 0, rst, program_en;
  logic [AW-1:0] mult_address;
  logic [COEF_W-1:0] filter_coeff;
  logic signed [DATA_W-1:0] data_in;
  logic signed [DATA_W+COEF_W+AW-1:0] data_out;
  int checks = 0, failures = 0;
  int h [N];          // h[k], k = tap
  int xh [N];         // xh[k] = x(n-k)
  int quiet = 0;      // clocks since the last coefficient write

  csm_fir #(.N_TAPS(N), .DATA_W(DATA_W), .COEF_W(COEF_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One clock: apply inputs, let the edge pass, update the model, compare.
  task automatic step(input int x, input bit wr, input int a, input int c, input bit chk);
    int y;
    data_in = DATA_W'(x); program_en = wr; mult_address = AW'(a); filter_coeff = COEF_W'(c);
    @(posedge clk); #1;
    for (int k = N-1; k > 0; k--) xh[k] = xh[k-1];
    xh[0] = x;
    y = 0;
    for (int k = 0; k < N; k++) y += h[k] * xh[k];
    if (wr) begin h[N-1-a] = c; quiet = 0; end else quiet++;
    if (chk && quiet > N) begin
      checks++;
      if (int'(data_out) != y) begin
        failures++;
        if (failures < 10) $display("t=%0t got %0d exp %0d", $time, data_out, y);
      end
    end
  endtask

  initial begin
    automatic int fig_c [8] = '{7, 6, 8, 5, 7, 2, 2, 1};
    automatic int fig_x [9] = '{1, 12, 21, 31, 41, 51, 61, 71, 71};
    automatic int fig_y [9] = '{1, 14, 47, 104, 234, 410, 669, 984, 1355};
    rst = 1; program_en = 0; mult_address = '0; filter_coeff = '0; data_in = '0;
    foreach (h[k]) h[k] = 0;
    foreach (xh[k]) xh[k] = 0;
    @(posedge clk); #1;
    rst = 0;
    for (int a = 0; a < 8; a++) step(0, 1, a, fig_c[a], 0);
    for (int i = 0; i < 9; i++) begin
      step(fig_x[i], 0, 0, 0, 0);
      checks++;
      if (int'(data_out) != fig_y[i]) begin
        failures++;
        $display("example sample %0d: got %0d exp %0d", i, data_out, fig_y[i]);
      end
    end
    // Random coefficient sets, rewritten while data flows.
    for (int set = 0; set < 6; set++) begin
      for (int a = 0; a < N; a++)
        step(int'($urandom % 256) - 128, 1, a, (set == 0) ? 255 : int'($urandom % 256), 1);
      repeat (60) step(int'($urandom % 256) - 128, 0, 0, 0, 1);
      repeat (4) step(-128, 0, 0, 0, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
