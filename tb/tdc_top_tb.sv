// tdc_top_tb: end-to-end run of the whole TDC at its real clock rates
// (320 MHz sampling clocks, 160 MHz logic, 10 MHz JTAG), with every
// parameter at its default. The testbench acts as the front end (channel
// pulses), the TTC source, the JTAG master and the receiver: it aligns to
// the K28.5 commas, decodes both 8b/10b lanes, merges them into the byte
// stream and cuts it into words. Expected hit times are computed from the
// absolute simulation time of each pulse edge: bin = ceil((t - t0) /
// 781.25 ps) plus one constant offset (the counter phase after the bunch
// count reset), measured once with a calibration pulse.
//
// Phases: JTAG IDCODE and setup read-back; triggerless pair mode on all 24
// channels; triggerless edge mode; triggered pair mode with TTC triggers
// and with the trigger pin, hits inside and outside the window; a trigger
// burst that overflows the trigger FIFO; a hit burst that fills the readout FIFO and overflows channel FIFOs (status read
// through JTAG); single-event upsets forced into triplicated registers
// during traffic; TTC master reset; bunch count reset from the BCR pin. Each mechanism is counted and a
// mechanism that never happened counts as a failure.
module tdc_top_tb;
  timeunit 1ps;
  timeprecision 1fs;
  import tdc_pkg::*;
  import tb_8b10b_pkg::*;

  int checks = 0, failures = 0;
  bit dbg = 0;

  logic clk320 = 0, clk320_90 = 0, clk160 = 0, rst_n = 0;
  logic [NUM_CH-1:0] hit = '0;
  logic ttc = 0, bcr_pin = 0, trigger_pin = 0;
  logic tck = 0, tms = 1, tdi = 0, trst_n = 0, tdo;
  logic [1:0][1:0] dout;

  tdc_top dut (.clk320, .clk320_90, .clk160, .rst_n, .hit, .ttc, .bcr_pin, .trigger_pin,
               .tck, .tms, .tdi, .trst_n, .tdo, .dout);

  // 320 MHz: period 3125 ps, rising edges at k * 3125 ps. 160 MHz rising
  // edges coincide with every other 320 MHz rising edge.
  localparam real T320 = 3125.0;
  always #(T320 / 2) clk320 = !clk320;
  initial begin #(T320 / 4); forever #(T320 / 2) clk320_90 = !clk320_90; end
  always #(T320) clk160 = !clk160;
  always #50000 tck = !tck;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ------------------------------------------------------------------
  // receiver
  // ------------------------------------------------------------------
  logic [1:0][9:0] rxsh;
  bit              locked = 0;
  int              phase = 0, cyc = 0, bad_sym = 0, n_commas = 0;
  logic [7:0]      rx_bytes[$];
  logic [31:0]     rx_words[$];
  bit              rx_three[$];

  always @(posedge clk160) if (rst_n) begin
    for (int l = 0; l < 2; l++) rxsh[l] = {rxsh[l][7:0], dout[l]};
    cyc++;
    if (!locked) begin
      if (rxsh[0] == 10'b0011111010 || rxsh[0] == 10'b1100000101) begin
        locked = 1; phase = cyc % 5;
      end
    end else if (cyc % 5 == phase) begin
      for (int l = 0; l < 2; l++) begin
        logic [7:0] d;
        bit kk;
        if (!decode(rxsh[l], d, kk)) bad_sym++;
        else if (kk) n_commas++;
        else rx_bytes.push_back(d);
      end
      // cut the byte stream into words
      forever begin
        int need;
        if (rx_bytes.size() == 0) break;
        if (rx_bytes[0][7:3] == ID_HEADER || rx_bytes[0][7:3] == ID_TRAILER) need = 4;
        else if (rx_bytes[0][2:1] == MODE_PAIR) need = 4;
        else need = 3;
        if (rx_bytes.size() < need) break;
        begin
          logic [31:0] w;
          w = '0;
          for (int b = 0; b < need; b++) w[31 - 8*b -: 8] = rx_bytes.pop_front();
          rx_words.push_back(w);
          rx_three.push_back(need == 3);
          if (dbg) $display("%t rx %h", $realtime, w);
        end
      end
    end
  end

  // ------------------------------------------------------------------
  // JTAG master
  // ------------------------------------------------------------------
  task automatic jstep(input bit m, input bit d = 0);
    @(negedge tck); tms = m; tdi = d;
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

  logic [63:0] jo;
  int n_jtag_writes = 0;

  task automatic write_setup(input setup_t s);
    control_t c;
    c = '{soft_reset: 1'b1, bcr_sw: 1'b0};
    jshift(1, 4, 64'h3, jo);  jshift(0, CONTROL_W, 64'(c), jo);
    jshift(1, 4, 64'h2, jo);  jshift(0, SETUP_W, 64'(s), jo);
    jshift(0, SETUP_W, 64'(s), jo);
    check(jo[SETUP_W-1:0] == s, "setup read back");
    c.soft_reset = 1'b0;
    jshift(1, 4, 64'h3, jo);  jshift(0, CONTROL_W, 64'(c), jo);
    n_jtag_writes++;
    #200000;
  endtask

  task automatic read_status(output status_t st);
    jshift(1, 4, 64'h4, jo);
    jshift(0, STATUS_W, '0, jo);
    st = status_t'(jo[STATUS_W-1:0]);
  endtask

  // ------------------------------------------------------------------
  // TTC commands: start bit then {ECR, BCR, trigger}, one bit per 160 MHz cycle
  // ------------------------------------------------------------------
  int n_ttc_trig = 0, n_ttc_bcr = 0, n_ttc_ecr = 0, n_ttc_mr = 0;

  task automatic ttc_cmd(input logic [2:0] cmd);
    @(negedge clk160); ttc = 1;
    for (int i = 2; i >= 0; i--) begin @(negedge clk160); ttc = cmd[i]; end
    @(negedge clk160); ttc = 0;
    if (cmd == 3'b111) n_ttc_mr++;
    else begin
      n_ttc_trig += cmd[0]; n_ttc_bcr += cmd[1]; n_ttc_ecr += cmd[2];
    end
  endtask

  // ------------------------------------------------------------------
  // hits
  // ------------------------------------------------------------------
  longint off = 0;   // bin offset, from the calibration pulse

  function automatic longint bin_of(input real t);
    return longint'($ceil(t / (T320 / 4.0)));
  endfunction

  // A pulse on channel ch starting d ps from now, w ps wide; returns the
  // absolute bins of both edges. Start times are kept away from sampling
  // instants.
  task automatic pulse(input int ch, input real d, input real w, output longint bl, output longint bf);
    real t0, t1;
    t0 = $realtime + d;
    if (t0 / (T320 / 4.0) - $floor(t0 / (T320 / 4.0)) < 0.05) t0 += 60.0;
    t1 = t0 + w;
    if (t1 / (T320 / 4.0) - $floor(t1 / (T320 / 4.0)) < 0.05) t1 += 60.0;
    bl = bin_of(t0);
    bf = bin_of(t1);
    fork
      begin
        #(t0 - $realtime) hit[ch] = 1'b1;
        #(t1 - t0)        hit[ch] = 1'b0;
      end
    join_none
  endtask

  function automatic logic [31:0] pair_word(input int ch, input longint bl, input longint bf);
    longint wdt;
    wdt = bf - bl;
    if (wdt > 255) wdt = 255;
    return {5'(ch), MODE_PAIR, 17'(bl + off), 8'(wdt)};
  endfunction

  // Compare received words against an expected multiset.
  task automatic expect_set(ref logic [31:0] exp_w[$], input string what, input bit three);
    int missing = 0;
    check(rx_words.size() == exp_w.size(), $sformatf("%s: %0d words, expected %0d", what,
          rx_words.size(), exp_w.size()));
    foreach (exp_w[i]) begin
      int idx[$];
      idx = rx_words.find_first_index(x) with (x == exp_w[i]);
      if (idx.size() == 0) begin
        missing++;
        if (missing < 4) $display("  missing %h", exp_w[i]);
      end else begin
        check(rx_three[idx[0]] == three, "word length");
        rx_words.delete(idx[0]);
        rx_three.delete(idx[0]);
      end
    end
    check(missing == 0, $sformatf("%s: %0d expected words missing", what, missing));
    rx_words.delete(); rx_three.delete();
  endtask

  // ------------------------------------------------------------------
  // stimulus
  // ------------------------------------------------------------------
  int n_pair = 0, n_edge = 0, n_events = 0, n_pin_trig = 0, n_matched = 0, n_outside = 0;
  int n_trig_ovf = 0, n_bcr_pin = 0, n_ovf = 0, n_rdo_full = 0, n_seu = 0, n_mr_clear = 0;
  logic [31:0] exp_w[$];

  initial begin
    setup_t  s;
    status_t st;
    longint  bl, bf;

    #100000 rst_n = 1; trst_n = 1;
    repeat (5) jstep(1);
    jstep(0);
    jshift(0, 32, '0, jo);
    check(jo[31:0] == 32'h1D7C_0A0F, "IDCODE");
    jshift(1, 4, 64'h2, jo);
    jshift(0, SETUP_W, 64'(SETUP_DEFAULT), jo);
    check(jo[SETUP_W-1:0] == SETUP_DEFAULT, "setup default");

    ttc_cmd(3'b010);    // bunch count reset
    #500000;
    check(locked && n_commas > 0 && bad_sym == 0, "receiver locked on commas");

    // ---- calibration: one pulse on channel 0 ----
    pulse(0, 1000.0, 40000.0, bl, bf);
    #2000000;
    check(rx_words.size() == 1, "calibration word");
    if (rx_words.size() == 1) off = longint'(rx_words[0][24:8]) - bl;
    rx_words.delete(); rx_three.delete();

    // ---- triggerless pair mode, all channels ----
    exp_w.delete();
    for (int r = 0; r < 4; r++) begin
      for (int ch = 0; ch < NUM_CH; ch++) begin
        pulse(ch, 1000.0 + real'($urandom % 200000), 10000.0 + real'($urandom % 190000), bl, bf);
        exp_w.push_back(pair_word(ch, bl, bf));
        n_pair++;
      end
      #1000000;
    end
    #5000000;
    expect_set(exp_w, "triggerless pair mode", 0);

    // ---- triggerless edge mode ----
    s = SETUP_DEFAULT;
    s.pair_mode = 0; s.rise_en = 1; s.fall_en = 1;
    s.chnl_en[5] = 1'b0;                   // channel 5 switched off
    write_setup(s);
    exp_w.delete();
    for (int ch = 0; ch < NUM_CH; ch++) begin
      pulse(ch, 1000.0 + real'($urandom % 100000), 20000.0 + real'($urandom % 50000), bl, bf);
      if (ch != 5) begin
        exp_w.push_back({5'(ch), MODE_RISE, 17'(bl + off), 8'h00});
        exp_w.push_back({5'(ch), MODE_FALL, 17'(bf + off), 8'h00});
        n_edge += 2;
      end
    end
    #5000000;
    expect_set(exp_w, "triggerless edge mode", 1);

    // ---- triggered pair mode ----
    s = SETUP_DEFAULT;
    s.trig_mode = 1;
    s.search_offset = 15'd640;             // window opens 2 us before the trigger
    s.match_window  = 15'd480;             // and is 1.5 us wide
    write_setup(s);
    ttc_cmd(3'b100);                       // event count reset
    for (int e = 0; e < 4; e++) begin
      logic [31:0] in_w[$];
      int          nh;
      in_w.delete();
      if (e == 2) begin                    // switch to the trigger pin
        s.ext_trig = 1'b1;
        write_setup(s);                    // soft reset also clears the event count
      end
      // hits 3 us before the trigger (outside) and 1.6 .. 0.7 us before (inside)
      for (int ch = 0; ch < NUM_CH; ch += 3) begin
        pulse(ch, 1000.0, 30000.0, bl, bf);
        n_outside++;
      end
      #1400000;
      for (int ch = 1; ch < NUM_CH; ch += 2) begin
        pulse(ch, real'($urandom % 800000), 15000.0, bl, bf);
        in_w.push_back(pair_word(ch, bl, bf));
      end
      #1600000;
      if (e < 2) ttc_cmd(3'b001);
      else begin
        @(negedge clk160); trigger_pin = 1;
        repeat (4) @(negedge clk160); trigger_pin = 0;
        n_pin_trig++;
      end
      #3000000;
      // header, hits in channel order, trailer
      nh = in_w.size();
      check(rx_words.size() == nh + 2, $sformatf("event %0d: %0d words, expected %0d", e, rx_words.size(), nh + 2));
      if (rx_words.size() == nh + 2) begin
        check(rx_words[0][31:27] == ID_HEADER && rx_words[0][11:0] == 12'(e % 2), "event header");
        check(rx_words[nh + 1] == {ID_TRAILER, 3'b000, 12'(e % 2), 12'(nh)}, "event trailer");
        for (int i = 0; i < nh; i++) begin
          check(rx_words[1 + i] == in_w[i], $sformatf("event %0d hit %0d: %h expected %h", e, i,
                rx_words[1 + i], in_w[i]));
          n_matched++;
        end
        n_events++;
      end
      rx_words.delete(); rx_three.delete();
    end

    // ---- trigger burst: the trigger FIFO overflows ----
    s.ext_trig = 1'b0;
    write_setup(s);
    for (int k = 0; k < 40; k++) ttc_cmd(3'b001);
    #20000000;
    read_status(st);
    check(st.trig_ovf, "trigger FIFO overflow flagged");
    if (st.trig_ovf) n_trig_ovf++;
    begin
      int nhd = 0, ntr = 0;
      foreach (rx_words[i]) begin
        nhd += (rx_words[i][31:27] == ID_HEADER);
        ntr += (rx_words[i][31:27] == ID_TRAILER);
      end
      check(nhd == ntr && nhd >= 16 && nhd < 40, $sformatf("burst: %0d headers %0d trailers", nhd, ntr));
    end
    rx_words.delete(); rx_three.delete();

    // ---- overload: readout FIFO full, channel FIFOs overflow ----
    write_setup(SETUP_DEFAULT);
    for (int r = 0; r < 8; r++) begin
      for (int ch = 0; ch < NUM_CH; ch++) pulse(ch, 1000.0, 10000.0, bl, bf);
      #40000;
    end
    #20000000;
    read_status(st);
    check(st.rdo_full, "readout FIFO full seen");
    check(st.chnl_ovf != '0, "channel FIFO overflow seen");
    if (st.rdo_full) n_rdo_full++;
    n_ovf = $countones(st.chnl_ovf);
    // every word that came out is a well-formed pair word of a known channel
    foreach (rx_words[i])
      check(rx_words[i][31:27] < 5'd24 && rx_words[i][26:25] == MODE_PAIR &&
            rx_words[i][7:0] inside {[8'd12:8'd14]} && !rx_three[i], "overload word well formed");
    check(rx_words.size() >= 100 && rx_words.size() < 8 * NUM_CH, "some words dropped, most delivered");
    rx_words.delete(); rx_three.delete();

    // ---- master reset clears the logic (and the sticky flags) ----
    ttc_cmd(3'b111);
    #100000;
    read_status(st);
    check(st == '0, "status cleared by master reset");
    if (st == '0) n_mr_clear++;
    // bunch count reset from the dedicated pin this time
    @(negedge clk160); bcr_pin = 1;
    repeat (4) @(negedge clk160); bcr_pin = 0;
    #500000;
    // recalibrate the offset after the new bunch count reset; the time is
    // counted from the pin pulse
    pulse(0, 1000.0, 40000.0, bl, bf);
    #2000000;
    check(rx_words.size() == 1 && rx_words[0][24:8] < 17'd1000, "time restarted by the BCR pin");
    if (rx_words.size() == 1 && rx_words[0][24:8] < 17'd1000) n_bcr_pin++;
    if (rx_words.size() == 1) off = longint'(rx_words[0][24:8]) - bl;
    rx_words.delete(); rx_three.delete();

    // ---- single-event upsets in triplicated registers during traffic ----
    exp_w.delete();
    for (int ch = 0; ch < NUM_CH; ch++) begin
      pulse(ch, 1000.0 + real'(ch) * 20000.0, 12000.0, bl, bf);
      exp_w.push_back(pair_word(ch, bl, bf));
    end
    for (int k = 0; k < 40; k++) begin
      #(10000.0 + real'($urandom % 5000));
      @(negedge clk160);
      case (k % 4)
        0: begin force dut.u_rdo_fifo.g_tmr.u_ptrs.g_copy[1].r = ~dut.u_rdo_fifo.g_tmr.u_ptrs.g_copy[1].r;
                 #100 release dut.u_rdo_fifo.g_tmr.u_ptrs.g_copy[1].r; end
        1: begin force dut.u_serial.u_ctl.g_copy[2].r = ~dut.u_serial.u_ctl.g_copy[2].r;
                 #100 release dut.u_serial.u_ctl.g_copy[2].r; end
        2: begin force dut.g_ch[7].u_channel.u_fifo.g_tmr.u_ptrs.g_copy[0].r =
                   ~dut.g_ch[7].u_channel.u_fifo.g_tmr.u_ptrs.g_copy[0].r;
                 #100 release dut.g_ch[7].u_channel.u_fifo.g_tmr.u_ptrs.g_copy[0].r; end
        default: begin force dut.u_cfg.u_setup.g_copy[1].r = ~dut.u_cfg.u_setup.g_copy[1].r;
                 #100 release dut.u_cfg.u_setup.g_copy[1].r; end
      endcase
      n_seu++;
    end
    #5000000;
    expect_set(exp_w, "traffic under upsets", 0);
    check(bad_sym == 0, "no invalid symbols");

    // ---- every mechanism happened ----
    check(n_pair > 0,      "mechanism: triggerless pair mode");
    check(n_edge > 0,      "mechanism: triggerless edge mode");
    check(n_events == 4,   "mechanism: triggered events built");
    check(n_matched > 0,   "mechanism: trigger matching");
    check(n_outside > 0,   "mechanism: hits outside the window");
    check(n_pin_trig > 0,  "mechanism: trigger pin");
    check(n_ttc_trig > 0 && n_ttc_bcr > 0 && n_ttc_ecr > 0 && n_ttc_mr > 0, "mechanism: TTC commands");
    check(n_rdo_full > 0,  "mechanism: readout FIFO full");
    check(n_ovf > 0,       "mechanism: channel FIFO overflow");
    check(n_mr_clear > 0,  "mechanism: master reset");
    check(n_trig_ovf > 0,  "mechanism: trigger FIFO overflow");
    check(n_bcr_pin > 0,   "mechanism: BCR pin");
    check(n_seu > 0,       "mechanism: upsets corrected");
    check(n_jtag_writes > 0, "mechanism: JTAG configuration");
    $display("pair %0d edge %0d events %0d matched %0d outside %0d pin %0d ttc %0d/%0d/%0d/%0d ovf-ch %0d seu %0d",
             n_pair, n_edge, n_events, n_matched, n_outside, n_pin_trig,
             n_ttc_trig, n_ttc_bcr, n_ttc_ecr, n_ttc_mr, n_ovf, n_seu);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
