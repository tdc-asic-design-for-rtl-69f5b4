// tdc_event_builder_tb: the channel FIFOs and matchers are modelled by
// queues: on each start strobe every channel "matches" a random number of
// hits, delivered into its FIFO model (4 words deep) over a random time
// while its busy flag is high. The event builder's output must be the
// header, the hits of channel 0, 1, ... 23 in order, and the trailer with
// the hit count, for every trigger in the trigger FIFO model.
module tdc_event_builder_tb;
  timeunit 1ps;
  timeprecision 1ps;
  import tdc_pkg::*;
  localparam int N = NUM_CH;
  int checks = 0, failures = 0;
  logic                clk = 0, rst_n = 0, enable = 1;
  logic                trig_empty, trig_rd, match_start, out_v, out_full = 0;
  trig_rec_t           trig_data;
  logic [COARSE_W-1:0] match_coarse;
  logic [N-1:0]        match_busy, ch_empty, ch_rd;
  rdo_word_t           ch_data [N];
  rdo_word_t           out_word;
  trig_rec_t           tq[$];
  rdo_word_t           fq [N][$];     // channel FIFO contents
  rdo_word_t           pend [N][$];   // hits still to be "matched"
  logic [31:0]         expected[$];
  logic [31:0]         got[$];

  tdc_event_builder #(.N(N)) dut (.clk, .rst_n, .enable, .trig_empty, .trig_data, .trig_rd,
    .match_start, .match_coarse, .match_busy, .ch_empty, .ch_data, .ch_rd,
    .out_v, .out_word, .out_full);

  always #3200 clk = !clk;

  // Present the queue models to the event builder after every change.
  task automatic refresh();
    trig_empty = (tq.size() == 0);
    trig_data  = tq.size() ? tq[0] : '0;
    for (int c = 0; c < N; c++) begin
      ch_empty[c]   = (fq[c].size() == 0);
      ch_data[c]    = fq[c].size() ? fq[c][0] : '0;
      match_busy[c] = (pend[c].size() != 0);
    end
  endtask

  trig_rec_t cur;
  always @(posedge clk) begin
    if (out_v) got.push_back(out_word.data);
    if (trig_rd) cur = tq.pop_front();
    for (int c = 0; c < N; c++) begin
      if (ch_rd[c]) void'(fq[c].pop_front());
      // matcher model: move a pending hit now and then
      if (pend[c].size() && fq[c].size() < 4 && ($urandom % 3) == 0) fq[c].push_back(pend[c].pop_front());
    end
    if (match_start) begin
      int nh;
      nh = 0;
      check(match_coarse == cur.coarse, "trigger time broadcast");
      expected.push_back({ID_HEADER, cur.coarse, cur.event_id});
      for (int c = 0; c < N; c++) begin
        int k;
        k = ($urandom % 4 == 0) ? $urandom % 7 : 0;
        for (int j = 0; j < k; j++) begin
          rdo_word_t w;
          w = '{three_bytes: 1'b0, data: {5'(c), 2'b11, 17'($urandom), 8'(j)}};
          pend[c].push_back(w);
          expected.push_back(w.data);
          nh++;
        end
      end
      expected.push_back({ID_TRAILER, 3'b000, cur.event_id, 12'(nh)});
    end
  end

  always @(negedge clk) refresh();

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    refresh();
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int e = 0; e < 30; e++) begin
      @(negedge clk);
      tq.push_back('{event_id: 12'(e), coarse: 15'($urandom)});
      refresh();
      repeat ($urandom % 20) @(negedge clk);
    end
    fork
      begin
        repeat (20000) begin @(negedge clk); out_full = ($urandom % 6) == 0; end
      end
    join
    out_full = 0;
    repeat (200) @(negedge clk);
    check(tq.size() == 0, "all triggers consumed");
    check(expected.size() >= 60, "an event built for every trigger");
    check(got.size() == expected.size(), $sformatf("word count %0d vs %0d", got.size(), expected.size()));
    for (int i = 0; i < got.size() && i < expected.size(); i++)
      check(got[i] == expected[i], $sformatf("word %0d: %h expected %h", i, got[i], expected[i]));
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
