// tb_psm_fir - self-checking test of the programmable-shift-method FIR filter.
// Part 1 (4 taps): the source's 4-tap example, coefficients 4,6,8,5 at
// indices 0..3 and samples 1,3,8,5,5,5,5, expecting 5,23,70,111,125,127,115
// one clock after each sample. Part 2 (same instance): random signed 16-bit
// sign-magnitude coefficients encoded with fir_pkg::bcse_encode, written as
// two rows each while data flows, compared with a direct-form convolution
// once N_TAPS clocks have passed since the last write.
module tb_psm_fir;
  import fir_pkg::*;
  localparam int unsigned N      = 4;
  localparam int unsigned DATA_W = 8;
  localparam int unsigned TAW    = $clog2(N);
  logic clk = 0, rst, program_en;
  logic [TAW:0] mult_address;
  logic [PSM_ROW_W-1:0] filter_coeff;
  logic signed [DATA_W-1:0] data_in;
  logic signed [DATA_W+19+TAW-1:0] data_out;
  int checks = 0, failures = 0;
  int h [N];
  int xh [N];
  int quiet = 0;

  psm_fir #(.N_TAPS(N), .DATA_W(DATA_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input int x, input bit wr, input int a, input logic [PSM_ROW_W-1:0] row,
                      input int hval, input bit chk);
    int y;
    data_in = DATA_W'(x); program_en = wr; mult_address = (TAW+1)'(a); filter_coeff = row;
    @(posedge clk); #1;
    for (int k = N-1; k > 0; k--) xh[k] = xh[k-1];
    xh[0] = x;
    y = 0;
    for (int k = 0; k < N; k++) y += h[k] * xh[k];
    if (wr) begin
      if (a % 2 == 1) h[N-1-a/2] = hval;   // both rows are in
      quiet = 0;
    end else quiet++;
    if (chk && quiet > N) begin
      checks++;
      if (int'(data_out) != y) begin
        failures++;
        if (failures < 10) $display("t=%0t got %0d exp %0d", $time, data_out, y);
      end
    end
  endtask

  task automatic write_coef(input int idx, input int hval, input int x0, input int x1);
    logic [2*PSM_ROW_W-1:0] rows;
    rows = bcse_encode(hval);
    step(x0, 1, 2*idx,   rows[2*PSM_ROW_W-1:PSM_ROW_W], hval, 1);
    step(x1, 1, 2*idx+1, rows[PSM_ROW_W-1:0],           hval, 1);
  endtask

  initial begin
    automatic int fig_c [4] = '{4, 6, 8, 5};
    automatic int fig_x [7] = '{1, 3, 8, 5, 5, 5, 5};
    automatic int fig_y [7] = '{5, 23, 70, 111, 125, 127, 115};
    rst = 1; program_en = 0; mult_address = '0; filter_coeff = '0; data_in = '0;
    foreach (h[k]) h[k] = 0;
    foreach (xh[k]) xh[k] = 0;
    @(posedge clk); #1;
    rst = 0;
    for (int a = 0; a < 4; a++) write_coef(a, fig_c[a], 0, 0);
    step(0, 0, 0, '0, 0, 0);
    for (int i = 0; i < 7; i++) begin
      step(fig_x[i], 0, 0, '0, 0, 0);
      checks++;
      if (int'(data_out) != fig_y[i]) begin
        failures++;
        $display("example sample %0d: got %0d exp %0d", i, data_out, fig_y[i]);
      end
    end
    for (int set = 0; set < 8; set++) begin
      for (int a = 0; a < N; a++)
        write_coef(a, (set == 0) ? ((a % 2) ? -32767 : 32767) : int'($urandom % 65535) - 32767,
                   int'($urandom % 256) - 128, int'($urandom % 256) - 128);
      repeat (40) step(int'($urandom % 256) - 128, 0, 0, '0, 0, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
