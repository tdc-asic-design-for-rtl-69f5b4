// tdc_trigger_interface: time-stamps triggers for triggered-mode readout.
//
// The trigger comes either from the TTC decoder or from the dedicated
// trigger pin (selected by the setup register); the pin is synchronised and
// its rising edge used. The block keeps its own copy of the coarse time in
// the 160 MHz domain, advancing by two 3.125 ns units per cycle and cleared
// by bunch count reset, and a 12-bit event counter cleared by event count
// reset. Each trigger is written into the trigger FIFO as {event id,
// coarse time}; the event counter advances for every trigger, so a trigger
// dropped because the FIFO was full leaves a gap in the event ids and sets
// the sticky trig_ovf flag.
//
// Resets: rst_n clears the event counter, the pin synchroniser and the
// flag; the coarse copy has its own reset, time_rst_n, so that a logic-only
// reset does not move it against the sampling counter, which only the chip
// reset and bunch count reset clear.
//
// Timing: the coarse copy is cleared a few 320 MHz cycles ahead of the
// sampling counter, a fixed offset taken up by the search offset of the
// trigger window. The mux and the trigger interface follow the chip; the
// counters and the record format are this design's own.
module tdc_trigger_interface
  import tdc_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      time_rst_n,   // reset of the coarse copy only
  input  logic      trig_mode,
  input  logic      ext_trig,
  input  logic      ttc_trigger,
  input  logic      trigger_pin,
  input  logic      bcr,
  input  logic      ecr,
  output logic      fifo_wr,
  output trig_rec_t fifo_wdata,
  input  logic      fifo_full,
  output logic      trig_ovf
);
  logic [2:0]          pin_sync;
  logic [COARSE_W-1:0] coarse;
  logic [EVID_W-1:0]   event_id;
  logic                trig;

  assign trig       = trig_mode && (ext_trig ? (pin_sync[1] && !pin_sync[2]) : ttc_trigger);
  assign fifo_wr    = trig && !fifo_full;
  assign fifo_wdata = '{event_id: event_id, coarse: coarse};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pin_sync <= '0;
      event_id <= '0;
      trig_ovf <= 1'b0;
    end else begin
      pin_sync <= {pin_sync[1:0], trigger_pin};
      if (ecr)       event_id <= '0;
      else if (trig) event_id <= event_id + 1'b1;
      if (trig && fifo_full) trig_ovf <= 1'b1;
    end
  end

  always_ff @(posedge clk or negedge time_rst_n) begin
    if (!time_rst_n) coarse <= '0;
    else             coarse <= bcr ? '0 : coarse + COARSE_W'(2);
  end
endmodule
