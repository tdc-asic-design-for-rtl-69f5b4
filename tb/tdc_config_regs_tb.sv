// tdc_config_regs_tb: checks the reset defaults, writes through the strobes
// (and no change without one), and that an upset of one copy of the
// triplicated setup register never shows at the output and is scrubbed at
// the next TCK edge.
module tdc_config_regs_tb;
  timeunit 1ps;
  timeprecision 1ps;
  import tdc_pkg::*;
  int checks = 0, failures = 0;
  logic tck = 0, rst_n = 0, setup_wr = 0, control_wr = 0;
  logic [SETUP_W-1:0] wr_data = '0;
  setup_t   setup;
  control_t control;

  tdc_config_regs dut (.tck, .rst_n, .setup_wr, .control_wr, .wr_data, .setup, .control);

  always #50000 tck = !tck;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  setup_t model;
  initial begin
    #120000 rst_n = 1;
    check(setup == SETUP_DEFAULT && control == '0, "reset defaults");
    model = SETUP_DEFAULT;
    for (int n = 0; n < 50; n++) begin
      @(negedge tck);
      wr_data = SETUP_W'({$urandom, $urandom});
      setup_wr = $urandom % 2; control_wr = $urandom % 2;
      @(posedge tck); #1;
      if (setup_wr) model = setup_t'(wr_data);
      check(setup == model, "setup write");
      if (control_wr) check(control == control_t'(wr_data[CONTROL_W-1:0]), "control write");
      setup_wr = 0; control_wr = 0;
      if (n % 5 == 0) begin
        @(negedge tck);
        if (n % 10 == 0) begin
          force dut.u_setup.g_copy[1].r = ~model;
          #10 release dut.u_setup.g_copy[1].r;
        end else begin
          force dut.u_setup.g_copy[2].r = ~model;
          #10 release dut.u_setup.g_copy[2].r;
        end
        #10 check(setup == model, "upset copy outvoted");
        @(posedge tck); #1;
        check(dut.u_setup.g_copy[1].r == model && dut.u_setup.g_copy[2].r == model,
              "upset copy scrubbed");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
