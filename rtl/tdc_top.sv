// tdc_top: digital core of the 24-channel MDT time-to-digital converter.
//
// Each channel input is timed on both edges by a four-phase interpolator
// running from the 320 MHz 0/90-degree clocks (0.78 ns bins, 17-bit times
// spanning 102.4 us), and the 160 MHz logic builds hit words from the edges.
// In triggerless mode the channel FIFOs are merged round-robin by the
// channel mux; in triggered mode the hits wait in per-channel ring buffers,
// triggers (from the TTC line or the trigger pin) are time-stamped into the
// trigger FIFO, and the event builder collects the hits in each trigger's
// window into a header/hits/trailer event. Either stream passes through the
// 16-word readout FIFO to the serial interface, which sends 8b/10b symbols
// on two 320 Mb/s lanes. Setup, control and status registers are reached
// through JTAG. State machines and FIFO pointers are triplicated together
// with their next-state logic (tmr_fsm_reg), configuration registers with
// scrubbing (tmr_reg), against single-event upsets.
//
// Interface: the three clocks come from the on-chip PLL, which is not part
// of this RTL; all pins are the single-ended core-side signals of the LVDS
// receivers and drivers. rst_n is the asynchronous chip reset; the TTC
// master reset and the control register's soft reset reset the 160 MHz
// logic only, apart from the serial interface, which keeps its symbol
// timing so that the receiver stays aligned (a word being sent is
// finished from the interface's own buffer). dout[l] carries two bits per 160 MHz cycle for lane l,
// dout[l][1] first. The block structure follows the chip's block diagram;
// the reset scheme and the bunch count reset sources are this design's own.
module tdc_top
  import tdc_pkg::*;
(
  input  logic              clk320,       // 320 MHz, 0 degrees
  input  logic              clk320_90,    // 320 MHz, 90 degrees
  input  logic              clk160,       // 160 MHz logic clock
  input  logic              rst_n,        // chip reset pin, active low
  input  logic [NUM_CH-1:0] hit,          // discriminated channel inputs
  input  logic              ttc,          // serial TTC command line
  input  logic              bcr_pin,      // dedicated bunch count reset pin
  input  logic              trigger_pin,  // external trigger
  input  logic              tck,
  input  logic              tms,
  input  logic              tdi,
  input  logic              trst_n,
  output logic              tdo,
  output logic [1:0][1:0]   dout          // [lane][bit pair]
);
  // ---------------- configuration ----------------
  setup_t   setup;
  control_t control;
  status_t  status;
  logic     setup_wr, control_wr;
  logic [SETUP_W-1:0] cfg_data;

  tdc_jtag_tap u_tap (
    .tck, .trst_n, .tms, .tdi, .tdo,
    .setup_q(setup), .control_q(control), .status,
    .setup_wr, .control_wr, .wr_data(cfg_data)
  );

  tdc_config_regs u_cfg (
    .tck, .rst_n, .setup_wr, .control_wr, .wr_data(cfg_data),
    .setup, .control
  );

  // ---------------- resets and TTC ----------------
  logic [1:0] rst_sync;
  logic       chip_rst160_n;
  logic [1:0] soft_sync;
  logic [2:0] bcrsw_sync, bcrpin_sync;
  logic       logic_rst_n;
  logic       ttc_trig, ttc_bcr, ttc_ecr, ttc_mr, bcr;

  always_ff @(posedge clk160 or negedge rst_n) begin
    if (!rst_n) rst_sync <= '0;
    else        rst_sync <= {rst_sync[0], 1'b1};
  end
  assign chip_rst160_n = rst_sync[1];

  tdc_ttc_decoder u_ttc (
    .clk(clk160), .rst_n(chip_rst160_n), .ttc,
    .trigger(ttc_trig), .bcr(ttc_bcr), .ecr(ttc_ecr), .master_reset(ttc_mr)
  );

  always_ff @(posedge clk160 or negedge chip_rst160_n) begin
    if (!chip_rst160_n) begin
      soft_sync   <= '0;
      bcrsw_sync  <= '0;
      bcrpin_sync <= '0;
      logic_rst_n <= 1'b0;
    end else begin
      soft_sync   <= {soft_sync[0], control.soft_reset};
      bcrsw_sync  <= {bcrsw_sync[1:0], control.bcr_sw};
      bcrpin_sync <= {bcrpin_sync[1:0], bcr_pin};
      logic_rst_n <= !ttc_mr && !soft_sync[1];
    end
  end

  assign bcr = ttc_bcr ||
               (bcrsw_sync[1]  && !bcrsw_sync[2]) ||
               (bcrpin_sync[1] && !bcrpin_sync[2]);

  // ---------------- time measurement ----------------
  // Every edge sampler has its own coarse counter inside its channel
  // slice; bcr clears them all in the same 320 MHz cycle.
  logic                match_start;
  logic [COARSE_W-1:0] match_coarse;
  logic [NUM_CH-1:0]   ch_empty, ch_busy, ch_ovf, ch_rd, ch_rd_mux, ch_rd_eb;
  rdo_word_t           ch_data [NUM_CH];

  for (genvar c = 0; c < NUM_CH; c++) begin : g_ch
    tdc_channel #(.CH_ID(CHID_W'(c))) u_channel (
      .clk320, .clk320_90, .clk160, .rst_n, .rst160_n(logic_rst_n),
      .hit(hit[c]), .bcr, .setup,
      .trig_start(match_start), .trig_coarse(match_coarse),
      .fifo_rd(ch_rd[c]), .fifo_empty(ch_empty[c]), .fifo_data(ch_data[c]),
      .match_busy(ch_busy[c]), .ovf(ch_ovf[c])
    );
  end

  // ---------------- trigger path ----------------
  logic      tf_wr, tf_full, tf_empty, tf_rd, trig_ovf;
  trig_rec_t tf_wdata, tf_rdata;

  tdc_trigger_interface u_trig_if (
    .clk(clk160), .rst_n(logic_rst_n), .time_rst_n(chip_rst160_n),
    .trig_mode(setup.trig_mode), .ext_trig(setup.ext_trig),
    .ttc_trigger(ttc_trig), .trigger_pin, .bcr, .ecr(ttc_ecr),
    .fifo_wr(tf_wr), .fifo_wdata(tf_wdata), .fifo_full(tf_full),
    .trig_ovf
  );

  tdc_fifo #(.WIDTH($bits(trig_rec_t)), .DEPTH(16), .TMR(1'b0)) u_trig_fifo (
    .clk(clk160), .rst_n(logic_rst_n),
    .wr_en(tf_wr), .wdata(tf_wdata), .rd_en(tf_rd), .rdata(tf_rdata),
    .empty(tf_empty), .full(tf_full), .ovf()
  );

  // ---------------- readout ----------------
  logic      eb_v, mux_v, rf_wr, rf_full, rf_empty, rf_rd;
  rdo_word_t eb_word, mux_word, rf_wdata, rf_rdata;

  tdc_event_builder u_event (
    .clk(clk160), .rst_n(logic_rst_n), .enable(setup.trig_mode),
    .trig_empty(tf_empty), .trig_data(tf_rdata), .trig_rd(tf_rd),
    .match_start, .match_coarse, .match_busy(ch_busy),
    .ch_empty, .ch_data, .ch_rd(ch_rd_eb),
    .out_v(eb_v), .out_word(eb_word), .out_full(rf_full)
  );

  tdc_channel_mux u_mux (
    .clk(clk160), .rst_n(logic_rst_n), .enable(!setup.trig_mode),
    .ch_empty, .ch_data, .ch_rd(ch_rd_mux),
    .out_v(mux_v), .out_word(mux_word), .out_full(rf_full)
  );

  assign ch_rd    = setup.trig_mode ? ch_rd_eb : ch_rd_mux;
  assign rf_wr    = setup.trig_mode ? eb_v     : mux_v;
  assign rf_wdata = setup.trig_mode ? eb_word  : mux_word;

  tdc_fifo #(.WIDTH($bits(rdo_word_t)), .DEPTH(16), .TMR(1'b1)) u_rdo_fifo (
    .clk(clk160), .rst_n(logic_rst_n),
    .wr_en(rf_wr), .wdata(rf_wdata), .rd_en(rf_rd), .rdata(rf_rdata),
    .empty(rf_empty), .full(rf_full), .ovf()
  );

  tdc_serial_interface u_serial (
    .clk(clk160), .rst_n(chip_rst160_n),
    .fifo_empty(rf_empty), .fifo_data(rf_rdata), .fifo_rd(rf_rd),
    .dout, .symbol_start()
  );

  // ---------------- status ----------------
  logic rdo_full_seen;

  always_ff @(posedge clk160 or negedge logic_rst_n) begin
    if (!logic_rst_n)  rdo_full_seen <= 1'b0;
    else if (rf_full)  rdo_full_seen <= 1'b1;
  end

  assign status = '{chnl_ovf: ch_ovf, trig_ovf: trig_ovf, rdo_full: rdo_full_seen};
endmodule
