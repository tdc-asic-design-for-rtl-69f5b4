// tdc_coarse_counter_tb: checks that the coarse counter advances once per
// 320 MHz cycle, wraps after 2^15 cycles (102.4 us at 3.125 ns) and is
// cleared three cycles after a bunch count reset rises.
module tdc_coarse_counter_tb;
  timeunit 1ps;
  timeprecision 1ps;
  import tdc_pkg::*;
  int checks = 0, failures = 0;
  logic clk320 = 0, rst_n = 0, bcr = 0;
  logic [COARSE_W-1:0] coarse, prev;

  tdc_coarse_counter dut (.clk320, .rst_n, .bcr, .coarse);

  always #1600 clk320 = !clk320;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s coarse=%0d", what, coarse); end
  endtask

  int wraps = 0;
  initial begin
    repeat (2) @(posedge clk320);
    rst_n = 1;
    @(posedge clk320); #1 prev = coarse;
    for (int n = 0; n < 40000; n++) begin
      @(posedge clk320); #1;
      if (coarse == 0 && prev == '1) wraps++;
      if (n % 997 == 0) check(coarse == prev + 1'b1, "increment");
      prev = coarse;
    end
    check(wraps == 1, "wrap after 32768 cycles");
    // bunch count reset
    @(negedge clk320); bcr = 1;
    @(posedge clk320); #1 check(coarse != 0, "not yet cleared (1)");
    @(posedge clk320); #1 check(coarse != 0, "not yet cleared (2)");
    @(posedge clk320); #1 check(coarse == 0, "cleared on third edge");
    @(posedge clk320); #1 check(coarse == 1, "counts again while bcr held");
    bcr = 0;
    repeat (10) @(posedge clk320); #1 check(coarse == 11, "counting after bcr");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
