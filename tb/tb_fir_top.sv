// tb_fir_top - end-to-end test of fir_top at its default size (72 taps).
// Runs the three filters at once on independent random signed sample
// streams and compares every output with a direct-form convolution:
//  * CSM filter: 72 unsigned 8-bit coefficients, one sample per clock;
//  * PSM filter: 72 signed 16-bit coefficients encoded into two LUT rows
//    each with fir_pkg::bcse_encode, one sample per clock;
//  * FFA filter: 72 coefficients written as 36 pairs, two samples per clock.
// Each filter is reprogrammed several times while data keeps flowing; checks
// resume once the old partial sums have left the chain. The test counts the
// mechanisms it exercised and fails if one never happened: reconfiguration
// of each filter, PSM coefficients with a negative sign, with all five
// operands, with masked (unused) operands, and FFA sum coefficients that
// need the ninth bit.
module tb_fir_top;
  import fir_pkg::*;
  localparam int unsigned N      = 72;
  localparam int unsigned M      = N / 2;
  localparam int unsigned DATA_W = 8;
  localparam int unsigned COEF_W = 8;
  localparam int unsigned AW     = $clog2(N);
  localparam int unsigned KW     = $clog2(M);

  logic clk = 0, rst;
  logic                        csm_program_en;
  logic [AW-1:0]               csm_mult_address;
  logic [COEF_W-1:0]           csm_filter_coeff;
  logic signed [DATA_W-1:0]    csm_data_in;
  logic signed [DATA_W+COEF_W+AW-1:0] csm_data_out;
  logic                        psm_program_en;
  logic [AW:0]                 psm_mult_address;
  logic [PSM_ROW_W-1:0]        psm_filter_coeff;
  logic signed [DATA_W-1:0]    psm_data_in;
  logic signed [DATA_W+19+AW-1:0] psm_data_out;
  logic                        ffa_program_en;
  logic [KW-1:0]               ffa_mult_address;
  logic [2*COEF_W-1:0]         ffa_filter_coeff;
  logic signed [DATA_W-1:0]    ffa_x0, ffa_x1;
  logic signed [DATA_W+COEF_W+2+KW-1:0] ffa_y0, ffa_y1;

  fir_top dut (.*);

  int checks = 0, failures = 0;
  // models
  int     hc [N], hp [N], hf [N];
  int     xc [N], xp [N], xf [N+1];
  longint ef0_q, ef1_q;
  int     qc = 0, qp = 0, qf = 0;
  // pending writes (one per filter per clock)
  int     c_left = 0, p_left = 0, f_left = 0;
  int     c_new [N], p_new [N], f_new [N];
  logic [2*PSM_ROW_W-1:0] p_rows;
  // mechanism counters
  int n_csm_reconf = 0, n_psm_reconf = 0, n_ffa_reconf = 0;
  int n_psm_neg = 0, n_psm_five = 0, n_psm_masked = 0, n_ffa_carry = 0;
  int n_csm_chk = 0, n_psm_chk = 0, n_ffa_chk = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rs();
    return int'($urandom % 256) - 128;
  endfunction

  function automatic int popcount5(logic [4:0] m);
    int c = 0;
    for (int i = 0; i < 5; i++) c += m[i];
    return c;
  endfunction

  task automatic check(string what, longint got, longint exp, ref int n);
    checks++;
    n++;
    if (got != exp) begin
      failures++;
      if (failures < 12) $display("%s t=%0t got %0d exp %0d", what, $time, got, exp);
    end
  endtask

  // One clock for all three filters.
  task automatic step();
    longint yc, yp, e0, e1;
    int ia, ip, ifa;
    bit wc, wp, wf;
    wc = c_left > 0; wp = p_left > 0; wf = f_left > 0;
    ia  = N - c_left;
    ip  = 2*N - p_left;       // row index 0..2N-1
    ifa = M - f_left;
    csm_data_in = DATA_W'(rs());
    psm_data_in = DATA_W'(rs());
    ffa_x0 = DATA_W'(rs());
    ffa_x1 = DATA_W'(rs());
    csm_program_en = wc; csm_mult_address = AW'(ia); csm_filter_coeff = COEF_W'(c_new[wc ? ia : 0]);
    if (wp) p_rows = bcse_encode(p_new[ip/2]);
    psm_program_en = wp; psm_mult_address = (AW+1)'(ip);
    psm_filter_coeff = (ip % 2 == 0) ? p_rows[2*PSM_ROW_W-1:PSM_ROW_W] : p_rows[PSM_ROW_W-1:0];
    ffa_program_en = wf; ffa_mult_address = KW'(ifa);
    ffa_filter_coeff = {COEF_W'(f_new[wf ? 2*ifa+1 : 0]), COEF_W'(f_new[wf ? 2*ifa : 0])};
    @(posedge clk); #1;

    // CSM: output is y(n) of the sample just taken.
    for (int k = N-1; k > 0; k--) xc[k] = xc[k-1];
    xc[0] = int'(csm_data_in);
    yc = 0;
    for (int k = 0; k < N; k++) yc += longint'(hc[k]) * xc[k];
    if (qc > N) check("csm", longint'(csm_data_out), yc, n_csm_chk);
    if (wc) begin hc[N-1-ia] = c_new[ia]; qc = 0; c_left--; end else qc++;

    // PSM.
    for (int k = N-1; k > 0; k--) xp[k] = xp[k-1];
    xp[0] = int'(psm_data_in);
    yp = 0;
    for (int k = 0; k < N; k++) yp += longint'(hp[k]) * xp[k];
    if (qp > N) check("psm", longint'(psm_data_out), yp, n_psm_chk);
    if (wp) begin
      if (ip % 2 == 1) begin
        psm_row0_t r0;
        r0 = psm_row0_t'(p_rows[2*PSM_ROW_W-1:PSM_ROW_W]);
        hp[N-1-ip/2] = p_new[ip/2];
        if (r0.sign) n_psm_neg++;
        if (popcount5(r0.mask) == 5) n_psm_five++;
        if (popcount5(r0.mask) < 5 && p_new[ip/2] != 0) n_psm_masked++;
      end
      qp = 0; p_left--;
    end else qp++;

    // FFA: outputs belong to the previous pair.
    if (qf > M + 2) begin
      check("ffa y0", longint'(ffa_y0), ef0_q, n_ffa_chk);
      check("ffa y1", longint'(ffa_y1), ef1_q, n_ffa_chk);
    end
    for (int i = N; i > 1; i--) xf[i] = xf[i-2];
    xf[1] = int'(ffa_x0);
    xf[0] = int'(ffa_x1);
    e0 = 0; e1 = 0;
    for (int i = 0; i < N; i++) begin
      e1 += longint'(hf[i]) * xf[i];
      e0 += longint'(hf[i]) * xf[i+1];
    end
    ef0_q = e0; ef1_q = e1;
    if (wf) begin
      hf[2*ifa] = f_new[2*ifa]; hf[2*ifa+1] = f_new[2*ifa+1];
      if (f_new[2*ifa] + f_new[2*ifa+1] > 255) n_ffa_carry++;
      qf = 0; f_left--;
    end else qf++;
  endtask

  initial begin
    rst = 1;
    csm_program_en = 0; csm_mult_address = '0; csm_filter_coeff = '0; csm_data_in = '0;
    psm_program_en = 0; psm_mult_address = '0; psm_filter_coeff = '0; psm_data_in = '0;
    ffa_program_en = 0; ffa_mult_address = '0; ffa_filter_coeff = '0; ffa_x0 = '0; ffa_x1 = '0;
    foreach (hc[k]) begin hc[k] = 0; hp[k] = 0; hf[k] = 0; xc[k] = 0; xp[k] = 0; xf[k] = 0; end
    xf[N] = 0; ef0_q = 0; ef1_q = 0;
    p_rows = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int set = 0; set < 4; set++) begin
      // New coefficient sets for all three filters, loaded while data flows.
      for (int k = 0; k < N; k++) begin
        c_new[k] = (set == 0) ? 255 : int'($urandom % 256);
        f_new[k] = (set == 0) ? 255 : int'($urandom % 256);
        case (set)
          0:       p_new[k] = (k % 2) ? -32767 : 32767;
          1:       p_new[k] = int'($urandom % 1024) - 512;          // few operands
          default: p_new[k] = int'($urandom % 65535) - 32767;
        endcase
      end
      c_left = N; p_left = 2*N; f_left = M;
      n_csm_reconf++; n_psm_reconf++; n_ffa_reconf++;
      repeat (2*N + 2*N + 40) step();
    end
    $display("mechanisms: csm_reconf=%0d psm_reconf=%0d ffa_reconf=%0d psm_neg=%0d psm_five=%0d psm_masked=%0d ffa_carry=%0d",
             n_csm_reconf, n_psm_reconf, n_ffa_reconf, n_psm_neg, n_psm_five, n_psm_masked, n_ffa_carry);
    $display("compared: csm=%0d psm=%0d ffa=%0d", n_csm_chk, n_psm_chk, n_ffa_chk);
    if (n_csm_reconf < 2 || n_psm_reconf < 2 || n_ffa_reconf < 2 || n_psm_neg == 0 ||
        n_psm_five == 0 || n_psm_masked == 0 || n_ffa_carry == 0 ||
        n_csm_chk == 0 || n_psm_chk == 0 || n_ffa_chk == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
