// tdc_ring_buffer_tb: writes random words into the 16-word ring buffer and
// checks every place against an array model after each write, including
// overwriting of the oldest word and the valid bits after reset.
module tdc_ring_buffer_tb;
  timeunit 1ps;
  timeprecision 1ps;
  import tdc_pkg::*;
  int checks = 0, failures = 0;
  logic      clk = 0, rst_n = 0, wr_en = 0, rd_valid;
  rdo_word_t wdata = '0, rd_data;
  logic [3:0] rd_idx = '0, wptr;
  rdo_word_t model [16];
  bit        mvalid[16];
  int        mptr = 0;

  tdc_ring_buffer #(.DEPTH(16)) dut (.clk, .rst_n, .wr_en, .wdata, .rd_idx, .rd_valid, .rd_data, .wptr);

  always #3200 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      rd_idx = 4'(i); #1 check(!rd_valid, "empty after reset");
    end
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      wr_en = ($urandom % 3) != 0;
      wdata = rdo_word_t'({$urandom, $urandom});
      @(posedge clk);
      if (wr_en) begin model[mptr] = wdata; mvalid[mptr] = 1; mptr = (mptr + 1) % 16; end
      @(negedge clk); wr_en = 0;
      check(int'(wptr) == mptr, "write pointer");
      for (int i = 0; i < 16; i++) begin
        rd_idx = 4'(i); #1;
        check(rd_valid == mvalid[i] && (!mvalid[i] || rd_data == model[i]), "contents");
      end
    end
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
