// tb_ffa2_fir - self-checking test of the two-parallel fast FIR filter.
// Feeds a random signed sample stream two samples per clock (x(2k) on x0,
// x(2k+1) on x1) and compares y0/y1 with a direct-form convolution of the
// full-rate stream, y(n) = sum h(i) x(n-i), two clocks after each pair.
// Coefficient pairs are rewritten while data flows (including all-255 sets,
// whose H0+H1 coefficients need the ninth bit); checks resume once the
// sub-filters have flushed (N_TAPS/2 + 2 clocks after the last write).
module tb_ffa2_fir;
  localparam int unsigned N      = 8;
  localparam int unsigned M      = N / 2;
  localparam int unsigned DATA_W = 8;
  localparam int unsigned COEF_W = 8;
  localparam int unsigned KW     = $clog2(M);
  localparam int unsigned OUT_W  = DATA_W + COEF_W + 2 + $clog2(M);
  logic clk = 0, rst, program_en;
  logic [KW-1:0] mult_address;
  logic [2*COEF_W-1:0] filter_coeff;
  logic signed [DATA_W-1:0] x0, x1;
  logic signed [OUT_W-1:0] y0, y1;
  int checks = 0, failures = 0;
  int h [N];
  int xh [N+1];          // xh[k] = x(2t+1-k) after pair t
  int e0_q, e1_q;        // expected outputs of the previous pair
  int quiet = 0;

  ffa2_fir #(.N_TAPS(N), .DATA_W(DATA_W), .COEF_W(COEF_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input int a0, input int a1, input bit wr, input int k,
                      input int ce, input int co);
    int e0, e1;
    x0 = DATA_W'(a0); x1 = DATA_W'(a1);
    program_en = wr; mult_address = KW'(k); filter_coeff = {COEF_W'(co), COEF_W'(ce)};
    @(posedge clk); #1;
    // y0/y1 now show the pair before this one.
    if (quiet > M + 2) begin
      checks += 2;
      if (int'(y0) != e0_q || int'(y1) != e1_q) begin
        failures++;
        if (failures < 10) $display("t=%0t got %0d %0d exp %0d %0d", $time, y0, y1, e0_q, e1_q);
      end
    end
    for (int i = N; i > 1; i--) xh[i] = xh[i-2];
    xh[1] = a0;
    xh[0] = a1;
    e0 = 0; e1 = 0;
    for (int i = 0; i < N; i++) begin
      e1 += h[i] * xh[i];       // y(2t+1)
      e0 += h[i] * xh[i+1];     // y(2t)
    end
    e0_q = e0; e1_q = e1;
    if (wr) begin h[2*k] = ce; h[2*k+1] = co; quiet = 0; end else quiet++;
  endtask

  function automatic int rs();
    return int'($urandom % 256) - 128;
  endfunction

  initial begin
    rst = 1; program_en = 0; mult_address = '0; filter_coeff = '0; x0 = '0; x1 = '0;
    foreach (h[i]) h[i] = 0;
    foreach (xh[i]) xh[i] = 0;
    e0_q = 0; e1_q = 0;
    @(posedge clk); #1;
    rst = 0;
    for (int set = 0; set < 8; set++) begin
      for (int k = 0; k < M; k++) begin
        automatic int ce = (set == 0) ? 255 : int'($urandom % 256);
        automatic int co = (set == 0) ? 255 : int'($urandom % 256);
        step(rs(), rs(), 1, k, ce, co);
      end
      repeat (50) step(rs(), rs(), 0, 0, 0, 0);
      repeat (6) step(-128, -128, 0, 0, 0, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
