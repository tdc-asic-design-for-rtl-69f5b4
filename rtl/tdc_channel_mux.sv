// tdc_channel_mux: triggerless-mode merge of the channel FIFOs.
//
// Each cycle in which the readout FIFO can take a word, the mux takes one
// word from the first non-empty channel FIFO at or after a round-robin
// pointer, then moves the pointer past that channel, so every channel with
// data is served within NUM_CH words. The choice is combinational: the
// channel FIFO read strobe and the readout FIFO write strobe are issued in
// the same cycle. The mux follows the chip; round-robin order is this
// design's own.
module tdc_channel_mux
  import tdc_pkg::*;
#(
  parameter int unsigned N = NUM_CH
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      enable,
  input  logic      [N-1:0] ch_empty,
  input  rdo_word_t ch_data [N],
  output logic      [N-1:0] ch_rd,
  output logic      out_v,
  output rdo_word_t out_word,
  input  logic      out_full
);
  localparam int unsigned CW = $clog2(N);

  logic [CW-1:0] rr, sel;
  logic          found;

  always_comb begin
    found = 1'b0;
    sel   = '0;
    for (int k = N - 1; k >= 0; k--) begin
      int c;
      c = (int'(rr) + k) % N;
      if (!ch_empty[c]) begin
        found = 1'b1;
        sel   = CW'(c);
      end
    end
  end

  assign out_v    = enable && found && !out_full;
  assign out_word = ch_data[sel];

  always_comb begin
    ch_rd = '0;
    if (out_v) ch_rd[sel] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     rr <= '0;
    else if (out_v) rr <= (int'(sel) == N - 1) ? '0 : sel + 1'b1;
  end
endmodule
