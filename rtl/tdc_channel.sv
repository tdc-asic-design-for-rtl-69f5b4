// tdc_channel: one of the 24 TDC channel slices.
//
// Two four-phase interpolators time the leading and trailing edges of the
// channel's (discriminated) input; the falling-edge one sees the inverted
// signal. Each edge crosses from the 320 MHz sampling domain into the
// 160 MHz logic through a toggle synchroniser: the 320 MHz side flips a bit
// and holds the time, the 160 MHz side sees the flip after two flip-flops
// and takes the time, which is then stable. The hit builder forms the words.
// In triggerless mode they go straight into the 4-word channel FIFO; in
// triggered mode they go into the 16-word ring buffer, and the trigger
// matcher moves the words inside each trigger window into the channel FIFO.
// Each interpolator has its own coarse counter; all counters in the chip
// start together at reset and are cleared together by a bunch count reset.
// The channel FIFO's pointers are triplicated.
//
// Interface: bcr is the bunch count reset pulse from the 160 MHz logic,
// cleared into both coarse counters; trig_start and
// trig_coarse come from the event builder; the FIFO's read side goes to the
// channel mux or the event builder. ovf is a sticky flag set when the
// channel FIFO dropped a word. Timing: a hit word reaches the FIFO about
// six 160 MHz cycles after its edge. Edges on the same polarity must be at
// least three 160 MHz cycles (19 ns) apart to be resolved. The structure
// follows the chip's channel slice; the synchroniser is this design's own.
module tdc_channel
  import tdc_pkg::*;
#(
  parameter logic [CHID_W-1:0] CH_ID = '0
) (
  input  logic                clk320,
  input  logic                clk320_90,
  input  logic                clk160,
  input  logic                rst_n,       // chip reset, asynchronous
  input  logic                rst160_n,    // logic reset, clk160 domain
  input  logic                hit,
  input  logic                bcr,         // bunch count reset pulse, clk160 domain
  input  setup_t              setup,
  input  logic                trig_start,
  input  logic [COARSE_W-1:0] trig_coarse,
  input  logic                fifo_rd,
  output logic                fifo_empty,
  output rdo_word_t           fifo_data,
  output logic                match_busy,
  output logic                ovf
);
  tdc_time_t rise_t320, fall_t320;
  logic      rise_tog, fall_tog;

  logic [COARSE_W-1:0] rise_coarse, fall_coarse;

  tdc_coarse_counter u_rise_cnt (.clk320, .rst_n, .bcr, .coarse(rise_coarse));
  tdc_coarse_counter u_fall_cnt (.clk320, .rst_n, .bcr, .coarse(fall_coarse));

  tdc_edge_sampler u_rise (
    .clk320, .clk320_90, .rst_n, .hit(hit), .coarse(rise_coarse),
    .ev_time(rise_t320), .ev_toggle(rise_tog)
  );

  tdc_edge_sampler u_fall (
    .clk320, .clk320_90, .rst_n, .hit(!hit), .coarse(fall_coarse),
    .ev_time(fall_t320), .ev_toggle(fall_tog)
  );

  // Toggle synchronisers into the 160 MHz domain.
  logic [2:0] rise_sync, fall_sync;
  logic       rise_v, fall_v;
  tdc_time_t  rise_t, fall_t;

  always_ff @(posedge clk160 or negedge rst_n) begin
    if (!rst_n) begin
      rise_sync <= '0;
      fall_sync <= '0;
    end else begin
      rise_sync <= {rise_sync[1:0], rise_tog};
      fall_sync <= {fall_sync[1:0], fall_tog};
    end
  end

  assign rise_v = rise_sync[2] ^ rise_sync[1];
  assign fall_v = fall_sync[2] ^ fall_sync[1];
  assign rise_t = rise_t320;   // stable for several cycles around rise_v
  assign fall_t = fall_t320;

  logic      hb_v;
  rdo_word_t hb_word;

  tdc_hit_builder #(.CH_ID(CH_ID)) u_hit_builder (
    .clk(clk160), .rst_n(rst160_n),
    .enable(setup.chnl_en[CH_ID]), .pair_mode(setup.pair_mode),
    .rise_en(setup.rise_en), .fall_en(setup.fall_en),
    .rise_v, .rise_t, .fall_v, .fall_t,
    .word_v(hb_v), .word(hb_word)
  );

  // Triggered mode: ring buffer and trigger matching.
  logic [3:0] rb_idx, rb_wptr;
  logic       rb_valid;
  rdo_word_t  rb_data;
  logic       m_v;
  rdo_word_t  m_word;
  logic       fifo_full, fifo_ovf;

  tdc_ring_buffer #(.DEPTH(16)) u_ring (
    .clk(clk160), .rst_n(rst160_n),
    .wr_en(hb_v && setup.trig_mode), .wdata(hb_word),
    .rd_idx(rb_idx), .rd_valid(rb_valid), .rd_data(rb_data), .wptr(rb_wptr)
  );

  tdc_trigger_matcher #(.DEPTH(16)) u_match (
    .clk(clk160), .rst_n(rst160_n),
    .start(trig_start && setup.trig_mode), .trig_coarse,
    .match_window(setup.match_window), .search_offset(setup.search_offset),
    .rb_idx, .rb_valid, .rb_data, .rb_wptr,
    .out_v(m_v), .out_word(m_word), .out_full(fifo_full), .busy(match_busy)
  );

  // Channel FIFO, fed by the hit builder or by the matcher.
  logic      f_wr;
  rdo_word_t f_wdata;

  assign f_wr    = setup.trig_mode ? m_v    : hb_v;
  assign f_wdata = setup.trig_mode ? m_word : hb_word;

  tdc_fifo #(.WIDTH($bits(rdo_word_t)), .DEPTH(4), .TMR(1'b1)) u_fifo (
    .clk(clk160), .rst_n(rst160_n),
    .wr_en(f_wr), .wdata(f_wdata), .rd_en(fifo_rd), .rdata(fifo_data),
    .empty(fifo_empty), .full(fifo_full), .ovf(fifo_ovf)
  );

  always_ff @(posedge clk160 or negedge rst160_n) begin
    if (!rst160_n)     ovf <= 1'b0;
    else if (fifo_ovf) ovf <= 1'b1;
  end
endmodule
