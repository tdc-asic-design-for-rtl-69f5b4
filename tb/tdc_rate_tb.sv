// tdc_rate_tb: triggerless readout of the whole core under random hit
// traffic on all 24 channels, at 200 kHz, 400 kHz and 660 kHz per channel
// (the last being the highest rate the two 320 Mb/s lanes can carry:
// 24 x 660 kHz x 4 bytes = 63.4 Mbyte/s of 64). Every parameter is at its
// default and the clocks run at their real rates.
//
// Each channel gets pulses 20 to 150 ns wide with exponentially distributed
// gaps (200 ns plus an exponential part, keeping the mean at 1/rate), for
// 40 us per rate. The receiver decodes the two
// lanes as in tdc_top_tb and matches each word to the pulse it came from by
// its channel, leading time and width. Latency is measured from the pulse's
// trailing edge to the moment the word's last symbol has been received. The
// test requires: at 200 and 400 kHz every pulse delivered once and no
// overflow flag; at 660 kHz at least 98% of the pulses delivered and every
// word a real pulse; and at 400 kHz 99% of the words out within 1 us. The
// measured latencies are printed.
module tdc_rate_tb;
  timeunit 1ps;
  timeprecision 1fs;
  import tdc_pkg::*;
  import tb_8b10b_pkg::*;

  int checks = 0, failures = 0;

  logic clk320 = 0, clk320_90 = 0, clk160 = 0, rst_n = 0;
  logic [NUM_CH-1:0] hit = '0;
  logic ttc = 0, bcr_pin = 0, trigger_pin = 0;
  logic tck = 0, tms = 1, tdi = 0, trst_n = 0, tdo;
  logic [1:0][1:0] dout;

  tdc_top dut (.clk320, .clk320_90, .clk160, .rst_n, .hit, .ttc, .bcr_pin, .trigger_pin,
               .tck, .tms, .tdi, .trst_n, .tdo, .dout);

  localparam real T320 = 3125.0;
  localparam real BIN  = T320 / 4.0;
  always #(T320 / 2) clk320 = !clk320;
  initial begin #(T320 / 4); forever #(T320 / 2) clk320_90 = !clk320_90; end
  always #(T320) clk160 = !clk160;
  always #50000 tck = !tck;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- receiver ----------------
  logic [1:0][9:0] rxsh;
  bit              locked = 0;
  int              phase = 0, cyc = 0, bad_sym = 0;
  logic [7:0]      rx_bytes[$];
  logic [31:0]     rx_words[$];
  real             rx_time[$];

  always @(posedge clk160) if (rst_n) begin
    for (int l = 0; l < 2; l++) rxsh[l] = {rxsh[l][7:0], dout[l]};
    cyc++;
    if (!locked) begin
      if (rxsh[0] == 10'b0011111010 || rxsh[0] == 10'b1100000101) begin
        locked = 1; phase = cyc % 5;
      end
    end else if (cyc % 5 == phase) begin
      for (int l = 0; l < 2; l++) begin
        logic [7:0] dd;
        bit kk;
        if (!decode(rxsh[l], dd, kk)) bad_sym++;
        else if (!kk) rx_bytes.push_back(dd);
      end
      while (rx_bytes.size() >= 4) begin
        logic [31:0] w;
        w = '0;
        for (int b = 0; b < 4; b++) w[31 - 8*b -: 8] = rx_bytes.pop_front();
        rx_words.push_back(w);
        rx_time.push_back($realtime);
      end
    end
  end

  // ---------------- JTAG status read ----------------
  task automatic jstep(input bit m, input bit dv = 0);
    @(negedge tck); tms = m; tdi = dv;
    @(posedge tck);
  endtask

  task automatic jshift(input bit ir, input int len, input logic [63:0] din, output logic [63:0] dout_v);
    dout_v = '0;
    jstep(1);
    if (ir) jstep(1);
    jstep(0);
    jstep(0);
    for (int i = 0; i < len; i++) begin
      @(negedge tck); tms = (i == len - 1); tdi = din[i];
      @(posedge tck); dout_v[i] = tdo;
    end
    jstep(1);
    jstep(0);
    #1;
  endtask

  task automatic read_status(output status_t st);
    logic [63:0] jo;
    jshift(1, 4, 64'h4, jo);
    jshift(0, STATUS_W, '0, jo);
    st = status_t'(jo[STATUS_W-1:0]);
  endtask

  task automatic master_reset();
    @(negedge clk160); ttc = 1;
    repeat (3) begin @(negedge clk160); ttc = 1; end
    @(negedge clk160); ttc = 0;
  endtask

  // ---------------- hits ----------------
  longint off = 0;
  real    t_trail[logic [31:0]];   // expected word -> trailing-edge time
  int     n_sent;

  function automatic longint bin_of(input real t);
    return longint'($ceil(t / BIN));
  endfunction

  function automatic real away(input real t);
    // keep edges off the sampling instants
    if (t / BIN - $floor(t / BIN) < 0.05) return t + 60.0;
    return t;
  endfunction

  function automatic real expo(input real mean);
    real u;
    u = (real'($urandom % 1000000) + 0.5) / 1000000.0;
    return -mean * $ln(u);
  endfunction

  // Drive one channel with random pulses from now until t_end.
  task automatic drive_channel(input int ch, input real rate_hz, input real t_end);
    real t0, t1, gap, prev;
    longint bl, bf, wdt;
    logic [31:0] w;
    prev = $realtime;
    forever begin
      // gaps between leading edges; 200 ns is more than the widest pulse
      gap = 200000.0 + expo(1.0e12 / rate_hz - 200000.0);
      t0 = away(prev + gap);
      prev = t0;
      if (t0 > t_end) break;
      t1 = away(t0 + 20000.0 + real'($urandom % 130000));
      bl = bin_of(t0); bf = bin_of(t1);
      wdt = bf - bl;
      w = {5'(ch), MODE_PAIR, 17'(bl + off), 8'(wdt)};
      #(t0 - $realtime) hit[ch] = 1'b1;
      #(t1 - t0)        hit[ch] = 1'b0;
      t_trail[w] = t1;
      n_sent++;
    end
  endtask

  task automatic run_rate(input real rate_hz, input bit lossless, output real p99);
    real    lat[$];
    int     unmatched = 0, n_words;
    real    t_end;
    status_t st;
    t_trail.delete();
    rx_words.delete(); rx_time.delete();
    n_sent = 0;
    t_end = $realtime + 40.0e6;
    for (int ch = 0; ch < NUM_CH; ch++) begin
      automatic int c = ch;
      fork drive_channel(c, rate_hz, t_end); join_none
    end
    #(40.0e6 + 5.0e6);
    wait fork;
    n_words = rx_words.size();
    foreach (rx_words[i]) begin
      if (t_trail.exists(rx_words[i])) begin
        lat.push_back(rx_time[i] - t_trail[rx_words[i]]);
        t_trail.delete(rx_words[i]);
      end else unmatched++;
    end
    lat.sort();
    p99 = lat.size() ? lat[(lat.size() * 99) / 100 - (lat.size() >= 100 ? 1 : 0)] / 1000.0 : 0.0;
    read_status(st);
    $display("rate %0.0f kHz: %0d pulses, %0d words, %0d unmatched, latency median %0.0f ns, 99%% %0.0f ns, max %0.0f ns, status %h",
             rate_hz / 1000.0, n_sent, n_words, unmatched,
             lat.size() ? lat[lat.size() / 2] / 1000.0 : 0.0, p99,
             lat.size() ? lat[lat.size() - 1] / 1000.0 : 0.0, st);
    check(unmatched == 0, "every word comes from a real pulse");
    check(n_sent > int'(rate_hz * 40.0e-6 * NUM_CH * 0.5), "enough pulses sent");
    if (lossless) begin
      check(n_words == n_sent, $sformatf("all %0d pulses delivered (got %0d)", n_sent, n_words));
      check(st == '0, "no overflow flagged");
    end else begin
      check(n_words * 100 >= n_sent * 98, $sformatf("%0d of %0d pulses delivered", n_words, n_sent));
    end
    check(bad_sym == 0, "no invalid symbols");
  endtask

  initial begin
    real p200, p400, p660;
    logic [63:0] jo;
    #100000 rst_n = 1; trst_n = 1;
    repeat (5) jstep(1);
    jstep(0);
    // bunch count reset, then one calibration pulse on channel 0
    @(negedge clk160); ttc = 1;
    @(negedge clk160); ttc = 0;
    @(negedge clk160); ttc = 1;
    @(negedge clk160); ttc = 0;
    @(negedge clk160);
    #500000;
    begin
      real t0; longint bl;
      t0 = away($realtime + 1000.0);
      bl = bin_of(t0);
      #(t0 - $realtime) hit[0] = 1'b1;
      #40000 hit[0] = 1'b0;
      #2000000;
      check(rx_words.size() == 1, "calibration word");
      if (rx_words.size() == 1) off = longint'(rx_words[0][24:8]) - bl;
    end

    run_rate(200.0e3, 1'b1, p200);
    master_reset(); #200000;
    run_rate(400.0e3, 1'b1, p400);
    check(p400 < 1000.0, "400 kHz: 99% of the words out within 1 us");
    master_reset(); #200000;
    run_rate(660.0e3, 1'b0, p660);
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
