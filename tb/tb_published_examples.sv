// tb_published_examples - the published example filters run on the default-size
// (72-tap) fir_top, with every coefficient not used by the example left 0.
//  * CSM: 8-tap example, coefficients 7,6,8,5,7,2,2,1 (example addresses
//    0..7, i.e. top addresses 64..71); samples 1,12,21,31,41,51,61,71,71
//    must give 1,14,47,104,234,410,669,984,1355, one clock after each sample.
//  * PSM: 4-tap example, coefficients 4,6,8,5 (top indices 68..71); samples
//    1,3,8,5,5,5,5 must give 5,23,70,111,125,127,115.
//  * FFA: the same 8-tap filter as the CSM example, h(0..7) =
//    1,2,2,7,5,8,6,7, fed the same samples two per clock; y0/y1 must give
//    the same nine outputs in pairs, two clocks after each pair.
module tb_published_examples;
  import fir_pkg::*;
  localparam int unsigned N = 72;
  logic clk = 0, rst;
  logic                 csm_program_en;
  logic [6:0]           csm_mult_address;
  logic [7:0]           csm_filter_coeff;
  logic signed [7:0]    csm_data_in;
  logic signed [22:0]   csm_data_out;
  logic                 psm_program_en;
  logic [7:0]           psm_mult_address;
  logic [17:0]          psm_filter_coeff;
  logic signed [7:0]    psm_data_in;
  logic signed [33:0]   psm_data_out;
  logic                 ffa_program_en;
  logic [5:0]           ffa_mult_address;
  logic [15:0]          ffa_filter_coeff;
  logic signed [7:0]    ffa_x0, ffa_x1;
  logic signed [23:0]   ffa_y0, ffa_y1;
  int checks = 0, failures = 0;

  fir_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    automatic int csm_c [8] = '{7, 6, 8, 5, 7, 2, 2, 1};
    automatic int csm_x [9] = '{1, 12, 21, 31, 41, 51, 61, 71, 71};
    automatic int csm_y [9] = '{1, 14, 47, 104, 234, 410, 669, 984, 1355};
    automatic int psm_c [4] = '{4, 6, 8, 5};
    automatic int psm_x [7] = '{1, 3, 8, 5, 5, 5, 5};
    automatic int psm_y [7] = '{5, 23, 70, 111, 125, 127, 115};
    automatic int ffa_h [8] = '{1, 2, 2, 7, 5, 8, 6, 7};
    logic [35:0] rows;
    rst = 1;
    csm_program_en = 0; csm_mult_address = '0; csm_filter_coeff = '0; csm_data_in = '0;
    psm_program_en = 0; psm_mult_address = '0; psm_filter_coeff = '0; psm_data_in = '0;
    ffa_program_en = 0; ffa_mult_address = '0; ffa_filter_coeff = '0; ffa_x0 = '0; ffa_x1 = '0;
    @(posedge clk); #1 rst = 0;
    // Load all three filters, one word per clock each.
    for (int i = 0; i < 8; i++) begin
      csm_program_en = 1; csm_mult_address = 7'(64 + i); csm_filter_coeff = 8'(csm_c[i]);
      psm_program_en = (i < 8);
      rows = bcse_encode(psm_c[i/2]);
      psm_mult_address = 8'(2*68 + i);
      psm_filter_coeff = (i % 2 == 0) ? rows[35:18] : rows[17:0];
      ffa_program_en = (i < 4);
      ffa_mult_address = 6'(i % 4);
      ffa_filter_coeff = {8'(ffa_h[2*(i%4)+1]), 8'(ffa_h[2*(i%4)])};
      @(posedge clk); #1;
    end
    csm_program_en = 0; psm_program_en = 0; ffa_program_en = 0;
    repeat (2) @(posedge clk);
    #1;
    // CSM and PSM streams.
    for (int i = 0; i < 9; i++) begin
      csm_data_in = 8'(csm_x[i]);
      psm_data_in = (i < 7) ? 8'(psm_x[i]) : 8'sd5;
      @(posedge clk); #1;
      expect_eq("csm", longint'(csm_data_out), csm_y[i]);
      if (i < 7) expect_eq("psm", longint'(psm_data_out), psm_y[i]);
    end
    // FFA stream: pairs of the same samples, then hold 71.
    for (int k = 0; k < 6; k++) begin
      ffa_x0 = 8'((2*k   < 9) ? csm_x[2*k]   : 71);
      ffa_x1 = 8'((2*k+1 < 9) ? csm_x[2*k+1] : 71);
      @(posedge clk); #1;
      if (k >= 1) begin
        // outputs of pair k-1
        expect_eq("ffa y0", longint'(ffa_y0), csm_y[2*(k-1)]);
        if (2*(k-1)+1 < 9) expect_eq("ffa y1", longint'(ffa_y1), csm_y[2*(k-1)+1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
