// tdc_channel_mux_tb: 24 queue-modelled channel FIFOs are filled at random
// and the mux output is checked against a round-robin reference: the first
// non-empty channel at or after the channel after the last one served.
// Also checks per-channel word order, the readout-full stall and that all
// channels are served.
module tdc_channel_mux_tb;
  timeunit 1ps;
  timeprecision 1ps;
  import tdc_pkg::*;
  localparam int N = NUM_CH;
  int checks = 0, failures = 0;
  logic             clk = 0, rst_n = 0, enable = 1, out_v, out_full = 0;
  logic [N-1:0]     ch_empty, ch_rd;
  rdo_word_t        ch_data [N];
  rdo_word_t        out_word;
  rdo_word_t        q [N][$];
  int               rr = 0, served[N], stalls = 0;

  tdc_channel_mux #(.N(N)) dut (.clk, .rst_n, .enable, .ch_empty, .ch_data, .ch_rd,
    .out_v, .out_word, .out_full);

  always #3200 clk = !clk;

  // Present the queue heads to the mux; called after every queue change.
  task automatic refresh();
    for (int c = 0; c < N; c++) begin
      ch_empty[c] = (q[c].size() == 0);
      ch_data[c]  = q[c].size() ? q[c][0] : '0;
    end
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int seq = 0;
  initial begin
    refresh();
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int exp_c;
      @(negedge clk);
      for (int c = 0; c < N; c++)
        if (($urandom % 40) == 0 && q[c].size() < 4) begin
          q[c].push_back('{three_bytes: 1'b0, data: {5'(c), 27'(seq)}});
          seq++;
        end
      out_full = ($urandom % 10) == 0;
      refresh();
      #1;
      exp_c = -1;
      for (int k = N - 1; k >= 0; k--) if (q[(rr + k) % N].size()) exp_c = (rr + k) % N;
      if (out_full) begin
        check(!out_v && ch_rd == '0, "stall while readout FIFO full");
        if (exp_c >= 0) stalls++;
      end else if (exp_c < 0) begin
        check(!out_v, "idle when all empty");
      end else begin
        check(out_v && ch_rd == (N'(1) << exp_c) && out_word == q[exp_c][0],
              $sformatf("round robin pick %0d", exp_c));
        @(posedge clk); #1;
        void'(q[exp_c].pop_front());
        refresh();
        served[exp_c]++;
        rr = (exp_c + 1) % N;
      end
    end
    for (int c = 0; c < N; c++) check(served[c] > 0, "every channel served");
    check(stalls > 0, "stall exercised");
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
