// tdc_trigger_matcher: copies the hits of one channel that fall inside a
// trigger window from the ring buffer into the channel FIFO.
//
// A start strobe carries the trigger's coarse time. The window opens
// search_offset coarse units (3.125 ns) before the trigger and is
// match_window units wide; a hit matches when its coarse time c satisfies
// (c - (trigger - search_offset)) mod 2^15 < match_window, so the window
// may straddle the counter wrap. The matcher then visits every ring-buffer
// place once, oldest first, one place per cycle, and pushes each valid,
// matching word; while the channel FIFO is full it waits on that place.
// busy is high from the cycle after start until the last place is done.
// out_word is the ring buffer's read data passed straight through (the
// buffer's read port is asynchronous); out_v says when it is to be written.
//
// Timing: a scan takes DEPTH cycles plus one per cycle of FIFO back
// pressure. Only the existence of trigger matching between the ring buffer
// and the channel FIFO comes from the chip; the window rule and the scan
// are this design's own.
module tdc_trigger_matcher
  import tdc_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [COARSE_W-1:0]      trig_coarse,
  input  logic [COARSE_W-1:0]      match_window,
  input  logic [COARSE_W-1:0]      search_offset,
  // ring buffer read port
  output logic [$clog2(DEPTH)-1:0] rb_idx,
  input  logic                     rb_valid,
  input  rdo_word_t                rb_data,
  input  logic [$clog2(DEPTH)-1:0] rb_wptr,
  // channel FIFO write port
  output logic                     out_v,
  output rdo_word_t                out_word,
  input  logic                     out_full,
  output logic                     busy
);
  localparam int unsigned IW = $clog2(DEPTH);

  logic [IW-1:0]       idx, count;
  logic [COARSE_W-1:0] lower;
  logic [COARSE_W-1:0] hit_coarse, rel;
  logic                match;

  assign rb_idx     = idx;
  assign hit_coarse = rb_data.data[TIME_LSB + FINE_W +: COARSE_W];
  assign rel        = hit_coarse - lower;
  assign match      = busy && rb_valid && (rel < match_window);
  assign out_v      = match && !out_full;
  assign out_word   = rb_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      idx   <= '0;
      count <= '0;
      lower <= '0;
    end else if (!busy) begin
      if (start) begin
        busy  <= 1'b1;
        idx   <= rb_wptr;
        count <= '0;
        lower <= trig_coarse - search_offset;
      end
    end else if (!(match && out_full)) begin
      idx   <= idx + 1'b1;
      count <= count + 1'b1;
      if (count == IW'(DEPTH - 1)) busy <= 1'b0;
    end
  end
endmodule
