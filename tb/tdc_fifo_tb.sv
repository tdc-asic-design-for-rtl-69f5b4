// tdc_fifo_tb: random pushes and pops against a queue model, for the 4-word
// triplicated-pointer configuration; checks data order, empty, full and the
// overflow strobe, and that a word written is readable the next cycle.
module tdc_fifo_tb;
  timeunit 1ps;
  timeprecision 1ps;
  int checks = 0, failures = 0;
  logic        clk = 0, rst_n = 0;
  logic        wr_en = 0, rd_en = 0, empty, full, ovf;
  logic [32:0] wdata = '0, rdata;
  logic [32:0] q[$];

  tdc_fifo #(.WIDTH(33), .DEPTH(4), .TMR(1'b1)) dut (
    .clk, .rst_n, .wr_en, .wdata, .rd_en, .rdata, .empty, .full, .ovf);

  always #3200 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int n_ovf = 0;
  bit acc;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      check(empty == (q.size() == 0), "empty flag");
      check(full  == (q.size() == 4), "full flag");
      if (q.size() > 0) check(rdata == q[0], "read data");
      wr_en = ($urandom % 100) < (n < 1500 ? 70 : 30);
      wdata = 33'({$urandom, $urandom});
      rd_en = (q.size() > 0) && (($urandom % 100) < (n < 1500 ? 30 : 70));
      #1;
      check(ovf == (wr_en && q.size() == 4), "overflow strobe");
      if (ovf) n_ovf++;
      acc = wr_en && q.size() < 4;
      @(posedge clk);
      if (rd_en) void'(q.pop_front());
      if (acc) q.push_back(wdata);
    end
    check(n_ovf > 0, "overflow exercised");
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
