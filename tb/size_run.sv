// size_run - test driver for one filter size, used by tb_table1_sizes.
// Instantiates a csm_fir and a psm_fir of N_TAPS taps, loads random
// coefficient sets (8-bit unsigned for CSM, 16-bit sign-magnitude through
// fir_pkg::bcse_encode for PSM), streams random signed samples and compares
// both outputs with a direct-form convolution once the chains have flushed.
// Raises `done` when finished and reports its counts on its ports.
module size_run
  import fir_pkg::*;
#(
  parameter int unsigned N_TAPS = 8,
  parameter int unsigned SETS   = 3
) (
  input  logic clk,
  input  logic rst,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned DATA_W = 8;
  localparam int unsigned COEF_W = 8;
  localparam int unsigned AW     = $clog2(N_TAPS);

  logic                          c_we, p_we;
  logic [AW-1:0]                 c_addr;
  logic [AW:0]                   p_addr;
  logic [COEF_W-1:0]             c_coef;
  logic [PSM_ROW_W-1:0]          p_row;
  logic signed [DATA_W-1:0]      xin;
  logic signed [DATA_W+COEF_W+AW-1:0] c_out;
  logic signed [DATA_W+19+AW-1:0]     p_out;

  csm_fir #(.N_TAPS(N_TAPS)) u_csm (
    .clk, .rst, .program_en(c_we), .mult_address(c_addr), .filter_coeff(c_coef),
    .data_in(xin), .data_out(c_out));
  psm_fir #(.N_TAPS(N_TAPS)) u_psm (
    .clk, .rst, .program_en(p_we), .mult_address(p_addr), .filter_coeff(p_row),
    .data_in(xin), .data_out(p_out));

  int hc [N_TAPS], hp [N_TAPS], xh [N_TAPS];

  initial begin
    logic [2*PSM_ROW_W-1:0] rows;
    longint yc, yp;
    int quiet;
    done = 0; checks = 0; failures = 0;
    c_we = 0; p_we = 0; c_addr = '0; p_addr = '0; c_coef = '0; p_row = '0; xin = '0;
    foreach (hc[k]) begin hc[k] = 0; hp[k] = 0; xh[k] = 0; end
    quiet = 0;
    @(negedge rst);
    for (int set = 0; set < SETS; set++) begin
      for (int a = 0; a < N_TAPS; a++) begin
        hc[N_TAPS-1-a] = int'($urandom % 256);
        hp[N_TAPS-1-a] = int'($urandom % 65535) - 32767;
        rows = bcse_encode(hp[N_TAPS-1-a]);
        // write CSM word and both PSM rows while the input is held at zero
        xin = '0;
        c_we = 1; c_addr = AW'(a); c_coef = COEF_W'(hc[N_TAPS-1-a]);
        p_we = 1; p_addr = (AW+1)'(2*a); p_row = rows[2*PSM_ROW_W-1:PSM_ROW_W];
        @(posedge clk); #1;
        c_we = 0;
        p_addr = (AW+1)'(2*a+1); p_row = rows[PSM_ROW_W-1:0];
        @(posedge clk); #1;
        p_we = 0;
      end
      foreach (xh[k]) xh[k] = 0;
      quiet = 0;
      repeat (3 * N_TAPS) begin
        xin = DATA_W'($urandom);
        @(posedge clk); #1;
        for (int k = N_TAPS-1; k > 0; k--) xh[k] = xh[k-1];
        xh[0] = int'(xin);
        yc = 0; yp = 0;
        for (int k = 0; k < N_TAPS; k++) begin
          yc += longint'(hc[k]) * xh[k];
          yp += longint'(hp[k]) * xh[k];
        end
        quiet++;
        if (quiet >= N_TAPS) begin
          checks += 2;
          if (longint'(c_out) != yc) begin
            failures++;
            if (failures < 5) $display("N=%0d csm got %0d exp %0d", N_TAPS, c_out, yc);
          end
          if (longint'(p_out) != yp) begin
            failures++;
            if (failures < 5) $display("N=%0d psm got %0d exp %0d", N_TAPS, p_out, yp);
          end
        end
      end
    end
    done = 1;
  end
endmodule
