// tdc_trigger_interface_tb: checks the trigger records: coarse time kept in
// the 160 MHz domain (two units per cycle, cleared by bunch count reset),
// event ids (advancing per trigger, cleared by event count reset), the
// source selection between TTC and the trigger pin, nothing in triggerless
// mode, and the overflow flag with the event-id gap when the FIFO is full.
module tdc_trigger_interface_tb;
  timeunit 1ps;
  timeprecision 1ps;
  import tdc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, trig_mode = 1, ext_trig = 0, ttc_trigger = 0, trigger_pin = 0;
  logic bcr = 0, ecr = 0, fifo_wr, fifo_full = 0, trig_ovf;
  trig_rec_t fifo_wdata;
  trig_rec_t got[$];
  int cyc = 0;

  tdc_trigger_interface dut (.clk, .rst_n, .time_rst_n(rst_n), .trig_mode, .ext_trig, .ttc_trigger, .trigger_pin,
    .bcr, .ecr, .fifo_wr, .fifo_wdata, .fifo_full, .trig_ovf);

  always #3200 clk = !clk;
  always @(posedge clk) begin
    cyc++;
    if (fifo_wr) got.push_back(fifo_wdata);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int bcr_cyc;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); bcr = 1; @(negedge clk); bcr = 0; bcr_cyc = cyc;
    @(negedge clk); ecr = 1; @(negedge clk); ecr = 0;
    for (int n = 0; n < 20; n++) begin
      int at;
      repeat ($urandom % 50) @(negedge clk);
      ttc_trigger = 1; at = cyc;
      @(negedge clk); ttc_trigger = 0;
      check(got.size() == 1, "one record per TTC trigger");
      if (got.size() == 1)
        check(got[0].event_id == 12'(n) && got[0].coarse == 15'(2 * (at - bcr_cyc)),
              $sformatf("record %0d: id %0d coarse %0d", n, got[0].event_id, got[0].coarse));
      got.delete();
    end
    // pin source, rising edge only
    ext_trig = 1;
    @(negedge clk); trigger_pin = 1;
    repeat (10) @(negedge clk);
    trigger_pin = 0; ttc_trigger = 1;
    @(negedge clk); ttc_trigger = 0;
    repeat (5) @(negedge clk);
    check(got.size() == 1 && got[0].event_id == 12'd20, "pin trigger once, TTC ignored");
    got.delete();
    // triggerless mode: nothing
    trig_mode = 0; ext_trig = 0;
    @(negedge clk); ttc_trigger = 1; @(negedge clk); ttc_trigger = 0;
    check(got.size() == 0, "no record in triggerless mode");
    // full FIFO: dropped, flagged, id still advances
    trig_mode = 1; fifo_full = 1;
    @(negedge clk); ttc_trigger = 1; @(negedge clk); ttc_trigger = 0;
    check(got.size() == 0 && trig_ovf, "dropped and flagged");
    fifo_full = 0;
    @(negedge clk); ttc_trigger = 1; @(negedge clk); ttc_trigger = 0;
    check(got.size() == 1 && got[0].event_id == 12'd22, "event id gap after drop");
    got.delete();
    // event count reset
    @(negedge clk); ecr = 1; @(negedge clk); ecr = 0;
    @(negedge clk); ttc_trigger = 1; @(negedge clk); ttc_trigger = 0;
    check(got.size() == 1 && got[0].event_id == 12'd0, "event count reset");
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
