// tdc_pkg: types and constants shared by the MDT TDC design.
//
// Time is measured in bins of one quarter of the 320 MHz period (0.78 ns).
// A time stamp is a 15-bit coarse count of 320 MHz cycles followed by a
// 2-bit fine (interpolated) part, 17 bits in all, which spans 102.4 us.
// The channel count, the 15+2 bit split and the pair-mode word layout
// (5-bit channel, 2-bit mode, 17-bit leading time, 8-bit width) follow the
// chip description; the edge-word length, the triggered-mode header and
// trailer, the setup-register fields and all defaults are this design's own.
package tdc_pkg;

  localparam int unsigned NUM_CH    = 24;   // input channels
  localparam int unsigned COARSE_W  = 15;   // coarse counter, 3.125 ns LSB
  localparam int unsigned FINE_W    = 2;    // interpolated part, 0.78 ns LSB
  localparam int unsigned TIME_W    = COARSE_W + FINE_W;
  localparam int unsigned WIDTH_W   = 8;    // pulse width in fine bins
  localparam int unsigned CHID_W    = 5;
  localparam int unsigned EVID_W    = 12;   // event counter (triggered mode)

  // Mode field of a hit word.
  typedef enum logic [1:0] {
    MODE_RISE = 2'b01,   // edge mode, leading edge
    MODE_FALL = 2'b10,   // edge mode, trailing edge
    MODE_PAIR = 2'b11    // pair mode, leading time + width
  } hit_mode_e;

  // Channel-id codes that no real channel uses mark event frames.
  localparam logic [CHID_W-1:0] ID_HEADER  = 5'h1E;
  localparam logic [CHID_W-1:0] ID_TRAILER = 5'h1F;

  // A readout word: up to four bytes, sent most significant byte first.
  // Edge-mode words carry three bytes (in data[31:8]); all others four.
  typedef struct packed {
    logic        three_bytes;
    logic [31:0] data;
  } rdo_word_t;

  // One timed edge out of an interpolator.
  typedef struct packed {
    logic [COARSE_W-1:0] coarse;
    logic [FINE_W-1:0]   fine;
  } tdc_time_t;

  // Trigger record kept in the trigger FIFO.
  typedef struct packed {
    logic [EVID_W-1:0]   event_id;
    logic [COARSE_W-1:0] coarse;
  } trig_rec_t;

  // Setup register (written through JTAG, triplicated).
  typedef struct packed {
    logic                trig_mode;     // 1: triggered, 0: triggerless
    logic                pair_mode;     // 1: pair, 0: edge
    logic                rise_en;       // edge mode: report leading edges
    logic                fall_en;       // edge mode: report trailing edges
    logic                ext_trig;      // 1: trigger from the trigger pin, 0: from TTC
    logic [NUM_CH-1:0]   chnl_en;       // per-channel enable
    logic [COARSE_W-1:0] match_window;  // trigger window width, coarse units
    logic [COARSE_W-1:0] search_offset; // window start before the trigger time
  } setup_t;

  localparam int unsigned SETUP_W = $bits(setup_t);

  localparam setup_t SETUP_DEFAULT = '{
    trig_mode:     1'b0,
    pair_mode:     1'b1,
    rise_en:       1'b1,
    fall_en:       1'b0,
    ext_trig:      1'b0,
    chnl_en:       {NUM_CH{1'b1}},
    match_window:  15'd320,    // 1 us
    search_offset: 15'd640     // 2 us
  };

  // Control register.
  typedef struct packed {
    logic soft_reset;   // holds the TDC logic in reset while set
    logic bcr_sw;       // rising edge issues a bunch count reset
  } control_t;

  localparam int unsigned CONTROL_W = $bits(control_t);

  // Status register, read back through JTAG.
  typedef struct packed {
    logic [NUM_CH-1:0] chnl_ovf;   // sticky: channel FIFO dropped a hit
    logic              trig_ovf;   // sticky: trigger FIFO dropped a trigger
    logic              rdo_full;   // sticky: readout FIFO was full
  } status_t;

  localparam int unsigned STATUS_W = $bits(status_t);

  // 8b/10b comma (K28.5) used as the idle symbol.
  localparam logic [7:0] K28_5 = 8'hBC;

  // Position of the 17-bit time in a hit word's data field.
  localparam int unsigned TIME_LSB = 8;

endpackage
