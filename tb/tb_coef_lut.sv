// tb_coef_lut - self-checking test of the coefficient look-up table.
// Writes random words to random addresses (some with we low, some out of
// range), mirrors them in a scoreboard array and compares every word after
// each clock; checks that reset clears all words.
module tb_coef_lut;
  localparam int unsigned DEPTH = 12;
  localparam int unsigned WIDTH = 18;
  localparam int unsigned AW = $clog2(DEPTH);
  logic clk = 0, rst, we;
  logic [AW-1:0] waddr;
  logic [WIDTH-1:0] wdata;
  logic [WIDTH-1:0] words [DEPTH];
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  coef_lut #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.clk, .rst, .we, .waddr, .wdata, .words);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(string what);
    for (int i = 0; i < DEPTH; i++) begin
      checks++;
      if (words[i] !== model[i]) begin
        failures++;
        if (failures < 10) $display("%s: word %0d got %h exp %h", what, i, words[i], model[i]);
      end
    end
  endtask

  initial begin
    rst = 1; we = 0; waddr = '0; wdata = '0;
    foreach (model[i]) model[i] = '0;
    @(posedge clk); #1;
    compare("reset");
    rst = 0;
    for (int n = 0; n < 400; n++) begin
      we    = ($urandom % 4) != 0;
      waddr = AW'($urandom % (1 << AW));
      wdata = WIDTH'($urandom);
      @(posedge clk); #1;
      if (we && waddr < DEPTH) model[waddr] = wdata;
      compare("write");
    end
    we = 0; rst = 1;
    @(posedge clk); #1;
    foreach (model[i]) model[i] = '0;
    compare("reset again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
