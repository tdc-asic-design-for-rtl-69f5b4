// tdc_hit_builder: turns timed edges of one channel into hit words.
//
// Pair mode pairs each leading edge with the following trailing edge and
// emits one four-byte word {channel, 2'b11, leading time (17 b), width (8 b)}.
// The width is trailing minus leading time in 0.78 ns bins, saturated at
// 255. A second leading edge before a trailing edge replaces the first; a
// trailing edge with no leading edge is ignored. Edge mode emits a
// three-byte word {channel, mode, time} for every enabled edge, with mode
// 2'b01 for leading and 2'b10 for trailing edges; when both edges arrive in
// the same cycle the trailing one is emitted one cycle later; every
// trailing edge passes through a one-word holding register.
//
// Interface: rise_v/fall_v are one-cycle strobes with their times, already
// in the 160 MHz domain; word_v is a one-cycle strobe with word. Timing: a
// word leaves one cycle after the edge that completes it, an edge-mode
// trailing edge two cycles. The pair-mode
// layout and the 0.78 ns width unit follow the chip's simulation output;
// the edge-word length, saturation and pairing rules are this design's own.
module tdc_hit_builder
  import tdc_pkg::*;
#(
  parameter logic [CHID_W-1:0] CH_ID = '0
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      enable,
  input  logic      pair_mode,
  input  logic      rise_en,
  input  logic      fall_en,
  input  logic      rise_v,
  input  tdc_time_t rise_t,
  input  logic      fall_v,
  input  tdc_time_t fall_t,
  output logic      word_v,
  output rdo_word_t word
);
  logic              have_lead;
  tdc_time_t         lead;
  logic              fall_pend;
  tdc_time_t         fall_pend_t;
  logic [TIME_W-1:0] diff;
  logic [WIDTH_W-1:0] width;
  tdc_time_t         lead_now;

  // The leading edge used by a trailing edge seen this cycle.
  assign lead_now = rise_v ? rise_t : lead;
  assign diff     = fall_t - lead_now;
  assign width    = (diff > TIME_W'((1 << WIDTH_W) - 1)) ? '1 : diff[WIDTH_W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_lead   <= 1'b0;
      lead        <= '0;
      fall_pend   <= 1'b0;
      fall_pend_t <= '0;
      word_v      <= 1'b0;
      word        <= '0;
    end else begin
      word_v    <= 1'b0;
      fall_pend <= 1'b0;
      if (!enable) begin
        have_lead <= 1'b0;
      end else if (pair_mode) begin
        if (fall_v && (have_lead || rise_v)) begin
          word_v    <= 1'b1;
          word      <= '{three_bytes: 1'b0,
                         data: {CH_ID, MODE_PAIR, lead_now, width}};
          have_lead <= 1'b0;
        end else if (rise_v) begin
          have_lead <= 1'b1;
          lead      <= rise_t;
        end
      end else begin
        // Edge mode: a leading edge goes out first; a trailing edge waits
        // in fall_pend while the output is busy.
        if (rise_v && rise_en) begin
          word_v <= 1'b1;
          word   <= '{three_bytes: 1'b1, data: {CH_ID, MODE_RISE, rise_t, 8'h00}};
        end else if (fall_pend) begin
          word_v <= 1'b1;
          word   <= '{three_bytes: 1'b1, data: {CH_ID, MODE_FALL, fall_pend_t, 8'h00}};
        end
        if (fall_v && fall_en) begin
          fall_pend   <= 1'b1;
          fall_pend_t <= fall_t;
        end else if (fall_pend && rise_v && rise_en) begin
          fall_pend   <= 1'b1;   // still waiting
        end
      end
    end
  end
endmodule
