// tdc_trigger_matcher_tb: a ring-buffer model holds hits at chosen coarse
// times; for random triggers the matcher's output is compared with the hits
// whose coarse time lies in [trigger - offset, trigger - offset + window)
// modulo 2^15, in buffer order from the oldest place. The FIFO's full flag
// is toggled at random to exercise back pressure, and the scan length
// (16 cycles plus stalls) is checked.
module tdc_trigger_matcher_tb;
  timeunit 1ps;
  timeprecision 1ps;
  import tdc_pkg::*;
  int checks = 0, failures = 0;
  logic                clk = 0, rst_n = 0, start = 0;
  logic [COARSE_W-1:0] trig_coarse = '0, match_window = 15'd40, search_offset = 15'd100;
  logic [3:0]          rb_idx, rb_wptr = '0;
  logic                rb_valid, out_v, out_full = 0, busy;
  rdo_word_t           rb_data, out_word;
  rdo_word_t           mem [16];
  logic [15:0]         val = '0;
  rdo_word_t           got[$], exp_q[$];

  tdc_trigger_matcher #(.DEPTH(16)) dut (.clk, .rst_n, .start, .trig_coarse, .match_window,
    .search_offset, .rb_idx, .rb_valid, .rb_data, .rb_wptr, .out_v, .out_word, .out_full, .busy);

  assign rb_valid = val[rb_idx];
  assign rb_data  = mem[rb_idx];

  always #3200 clk = !clk;
  always @(posedge clk) if (out_v) got.push_back(out_word);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int matched_total = 0, stalls_total = 0;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      int cycles, stalls;
      logic [COARSE_W-1:0] lower, tc;
      @(negedge clk);
      trig_coarse   = 15'($urandom);
      match_window  = 15'(10 + $urandom % 60);
      search_offset = 15'($urandom % 120);
      rb_wptr       = 4'($urandom);
      lower         = trig_coarse - search_offset;
      for (int i = 0; i < 16; i++) begin
        tc = lower + 15'($urandom % 120) - 15'd30;   // around the window
        mem[i] = '{three_bytes: 1'b0, data: {5'd3, 2'b11, tc, 2'($urandom), 8'($urandom)}};
        val[i] = ($urandom % 8) != 0;
      end
      exp_q.delete(); got.delete();
      for (int k = 0; k < 16; k++) begin
        int i;
        i  = (int'(rb_wptr) + k) % 16;
        tc = mem[i].data[24:10];
        if (val[i] && 15'(tc - lower) < match_window) exp_q.push_back(mem[i]);
      end
      start = 1;
      @(negedge clk); start = 0;
      cycles = 0; stalls = 0;
      while (busy && cycles < 200) begin
        out_full = ($urandom % 4) == 0;
        #1; if (out_full && rb_valid && dut.match) stalls++;
        @(negedge clk); cycles++;
      end
      out_full = 0;
      check(cycles == 16 + stalls, "scan length");
      check(got.size() == exp_q.size(), "number of matched hits");
      for (int j = 0; j < got.size() && j < exp_q.size(); j++)
        check(got[j] == exp_q[j], "matched hit and order");
      matched_total += got.size();
      stalls_total  += stalls;
    end
    check(matched_total > 50 && stalls_total > 5, "matches and back pressure exercised");
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
