// tdc_edge_sampler_tb: places rising edges at known positions inside the
// 320 MHz cycle (clock period 3.2 ns here, so a quarter is 800 ps) and
// checks the coarse count and the 2-bit fine time the interpolator
// reports, plus its latency of two 320 MHz cycles. Edges are placed 100 ps
// before a sampling edge, so the expected fine time is that sampling
// edge's phase index.
module tdc_edge_sampler_tb;
  timeunit 1ps;
  timeprecision 1ps;
  import tdc_pkg::*;
  int checks = 0, failures = 0;
  logic clk320 = 0, clk320_90 = 0, rst_n = 0, hit = 0;
  logic [COARSE_W-1:0] coarse = '0;
  tdc_time_t ev_time;
  logic      ev_toggle;

  tdc_edge_sampler dut (.clk320, .clk320_90, .rst_n, .hit, .coarse, .ev_time, .ev_toggle);

  always #1600 clk320 = !clk320;
  initial begin #800; forever #1600 clk320_90 = !clk320_90; end
  always @(posedge clk320) coarse <= coarse + 1'b1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%h", what, ev_time); end
  endtask

  int per_fine[4];
  initial begin
    repeat (3) @(posedge clk320);
    rst_n = 1;
    repeat (3) @(posedge clk320);
    for (int n = 0; n < 400; n++) begin
      int unsigned ph, cyc;
      logic [COARSE_W-1:0] c_exp;
      logic tog0;
      ph = $urandom % 4;
      @(posedge clk320); #1;
      c_exp = coarse;                    // count during this cycle
      tog0  = ev_toggle;
      if (ph == 0) begin
        #(2400 + 100 - 1);               // after the 3T/4 sample
        c_exp = c_exp + 1'b1;
      end else begin
        #(ph * 800 - 100 - 1);
      end
      hit = 1;
      cyc = 0;
      while (ev_toggle == tog0 && cyc < 10) begin @(posedge clk320); #1; cyc++; end
      check(ev_toggle != tog0, "edge reported");
      check(ev_time.fine == FINE_W'(ph), "fine time");
      check(ev_time.coarse == c_exp, "coarse time");
      check(cyc == ((ph == 0) ? 3 : 2), "latency: two cycles after the sampling edge");
      per_fine[ph]++;
      // trailing edge, then a quiet gap
      #(1000 + ($urandom % 5000)); hit = 0;
      repeat (3) @(posedge clk320); #1;
      check(ev_toggle != tog0 && ev_time.fine == FINE_W'(ph), "falling edge ignored");
    end
    for (int f = 0; f < 4; f++) check(per_fine[f] > 0, "every fine bin used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
