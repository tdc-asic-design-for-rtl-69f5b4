// tdc_config_regs: triplicated setup and control registers.
//
// The setup register (operating mode, edge selection, trigger source,
// channel enables, trigger window) and the control register (soft reset,
// software bunch count reset) are written by the JTAG TAP on its Update-DR
// strobes and held in tmr_reg cells clocked by TCK, so an upset bit is
// voted out and scrubbed at the next TCK edge. The chip reset loads the
// defaults (triggerless pair mode, all channels on). The status register
// is not stored here; the TAP reads it straight from the logic.
//
// Timing: a write takes effect at the TCK edge ending Update-DR. The setup
// register is read by the 160 MHz logic without synchronisation and must
// only be changed while the logic is held in soft reset. That these
// registers exist and are triplicated follows the chip; their fields and
// defaults are this design's own.
module tdc_config_regs
  import tdc_pkg::*;
(
  input  logic               tck,
  input  logic               rst_n,
  input  logic               setup_wr,
  input  logic               control_wr,
  input  logic [SETUP_W-1:0] wr_data,
  output setup_t             setup,
  output control_t           control
);
  tmr_reg #(.WIDTH(SETUP_W), .RESET_VAL(SETUP_DEFAULT)) u_setup (
    .clk({3{tck}}), .rst_n, .en(setup_wr), .d(wr_data), .q(setup)
  );

  tmr_reg #(.WIDTH(CONTROL_W), .RESET_VAL('0)) u_control (
    .clk({3{tck}}), .rst_n, .en(control_wr), .d(wr_data[CONTROL_W-1:0]), .q(control)
  );
endmodule
