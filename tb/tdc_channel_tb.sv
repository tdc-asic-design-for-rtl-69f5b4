// tdc_channel_tb: one channel slice with real clocks (320 MHz at a 3.2 ns
// period here, its 90-degree copy, and the 160 MHz logic clock). Pulses are
// placed at random times; the expected leading time is the index of the
// first 0.8 ns sampling point at or after the edge (plus the counter's
// offset), computed from the absolute simulation time. Covers triggerless
// pair mode, edge mode, channel-FIFO overflow and triggered mode (hits kept
// in the ring buffer and picked by a trigger window).
module tdc_channel_tb;
  timeunit 1ps;
  timeprecision 1ps;
  import tdc_pkg::*;
  int checks = 0, failures = 0;
  logic clk320 = 0, clk320_90 = 0, clk160 = 0, rst_n = 0, rst160_n = 0, hit = 0;
  setup_t    setup = SETUP_DEFAULT;
  logic      trig_start = 0, fifo_rd = 0, fifo_empty, match_busy, ovf;
  logic [COARSE_W-1:0] trig_coarse = '0;
  rdo_word_t fifo_data;
  rdo_word_t got[$];

  tdc_channel #(.CH_ID(5'd7)) dut (.clk320, .clk320_90, .clk160, .rst_n, .rst160_n, .hit,
    .bcr(1'b0), .setup, .trig_start, .trig_coarse, .fifo_rd, .fifo_empty, .fifo_data,
    .match_busy, .ovf);

  always #1600 clk320 = !clk320;
  initial begin #800; forever #1600 clk320_90 = !clk320_90; end
  always #3200 clk160 = !clk160;

  // drain the channel FIFO into a queue
  bit drain = 1;
  always @(negedge clk160) fifo_rd = drain && !fifo_empty;
  always @(posedge clk160) if (fifo_rd) got.push_back(fifo_data);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Expected 17-bit time of an edge at absolute time t (ps). The channel's
  // coarse counters leave zero at the first clk320 edge after reset
  // (20800 ps).
  function automatic logic [16:0] t_exp(input longint t);
    return 17'((t - 20800 + 799) / 800 + 4);
  endfunction

  task automatic pulse(input int width_ps, output logic [16:0] tl, output logic [16:0] tf);
    longint t;
    #(($urandom % 800) * 10 + 3);
    t = $time; hit = 1; tl = t_exp(t);
    #(width_ps);
    t = $time; hit = 0; tf = t_exp(t);
    #80000;
  endtask

  logic [16:0] tl, tf, wexp;
  rdo_word_t   keep[$];
  initial begin
    #20003 rst_n = 1;
    #10000 rst160_n = 1;
    #10000;
    // triggerless pair mode
    for (int n = 0; n < 30; n++) begin
      got.delete();
      pulse(10000 + $urandom % 150000, tl, tf);
      wexp = tf - tl;
      if (wexp > 255) wexp = 255;
      check(got.size() == 1, "one pair word");
      if (got.size() == 1)
        check(got[0].data == {5'd7, 2'b11, tl, wexp[7:0]} && !got[0].three_bytes,
              $sformatf("pair word %h, expected lead %h width %0d", got[0].data, tl, wexp));
    end
    // edge mode, both polarities
    setup.pair_mode = 0; setup.fall_en = 1;
    for (int n = 0; n < 10; n++) begin
      got.delete();
      pulse(20000 + $urandom % 50000, tl, tf);
      check(got.size() == 2, $sformatf("two edge words, got %0d: %h %h", got.size(), got.size() > 0 ? got[0].data : 0, got.size() > 1 ? got[1].data : 0));
      if (got.size() == 2)
        check(got[0].data == {5'd7, 2'b01, tl, 8'h0} && got[1].data == {5'd7, 2'b10, tf, 8'h0} &&
              got[0].three_bytes && got[1].three_bytes, $sformatf("edge words %h %h exp %h %h", got[0].data, got[1].data, tl, tf));
    end
    // overflow: stop draining, send 6 hits (FIFO holds 4 words)
    setup.pair_mode = 1;
    drain = 0;
    for (int n = 0; n < 6; n++) pulse(15000, tl, tf);
    check(ovf, "overflow flag set");
    got.delete(); drain = 1; #100000;
    check(got.size() == 4, "four words kept on overflow");
    // triggered mode: 8 hits, trigger window around hits 3..5
    setup.trig_mode = 1; got.delete(); keep.delete();
    begin
      logic [16:0] leads[8];
      for (int n = 0; n < 8; n++) begin pulse(15000, tl, tf); leads[n] = tl; end
      #20000;
      check(got.size() == 0, "triggered mode: nothing without a trigger");
      setup.search_offset = 15'd0;
      setup.match_window  = 15'(leads[5][16:2] - leads[3][16:2] + 1);
      @(negedge clk160);
      trig_coarse = leads[3][16:2]; trig_start = 1;
      @(negedge clk160); trig_start = 0;
      #200000;
      check(got.size() == 3, $sformatf("three hits in the window, got %0d", got.size()));
      for (int j = 0; j < got.size() && j < 3; j++)
        check(got[j].data[24:8] == leads[3 + j], "matched hit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
