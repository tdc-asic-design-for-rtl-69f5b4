// tdc_jtag_tap_tb: drives the TAP through TMS/TDI like a JTAG master and
// repeats the chip's JTAG checks: read IDCODE after reset, then the setup
// register's default, all zeros, all ones and a random value written and
// read back; also the control and status registers, BYPASS (one-bit delay)
// and the instruction-register capture value. The registers written are
// modelled in the testbench from the write strobes.
module tdc_jtag_tap_tb;
  timeunit 1ps;
  timeprecision 1ps;
  import tdc_pkg::*;
  int checks = 0, failures = 0;
  logic tck = 0, trst_n = 0, tms = 1, tdi = 0, tdo;
  setup_t   setup_q = SETUP_DEFAULT;
  control_t control_q = '0;
  status_t  status;
  logic setup_wr, control_wr;
  logic [SETUP_W-1:0] wr_data;
  localparam logic [31:0] ID = 32'h1D7C_0A0F;

  tdc_jtag_tap #(.IDCODE(ID)) dut (.tck, .trst_n, .tms, .tdi, .tdo, .setup_q, .control_q, .status,
    .setup_wr, .control_wr, .wr_data);

  always #50000 tck = !tck;
  always @(posedge tck) begin
    if (setup_wr)   setup_q   <= setup_t'(wr_data);
    if (control_wr) control_q <= control_t'(wr_data[CONTROL_W-1:0]);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic step(input bit m, input bit d = 0);
    @(negedge tck); tms = m; tdi = d;
    @(posedge tck);
  endtask

  // From Run-Test/Idle: shift len bits of din, return what came out.
  task automatic shift(input bit ir, input int len, input logic [63:0] din, output logic [63:0] dout);
    dout = '0;
    step(1);                // Select-DR
    if (ir) step(1);        // Select-IR
    step(0);                // Capture
    step(0);                // Shift
    for (int i = 0; i < len; i++) begin
      @(negedge tck); tms = (i == len - 1); tdi = din[i];
      @(posedge tck); dout[i] = tdo;
    end
    step(1);                // Update
    step(0);                // Run-Test/Idle
    #1;
  endtask

  logic [63:0] o;
  setup_t      s;
  initial begin
    status = '{chnl_ovf: 24'hA5_0F_3C, trig_ovf: 1'b1, rdo_full: 1'b0};
    #120000 trst_n = 1;
    repeat (5) step(1);
    step(0);
    shift(0, 32, '0, o);
    check(o[31:0] == ID, $sformatf("IDCODE %h", o[31:0]));
    shift(1, 4, 64'h2, o);
    check(o[3:0] == 4'b0001, "IR capture value");
    shift(0, SETUP_W, '0, o);
    check(o[SETUP_W-1:0] == SETUP_DEFAULT, "setup default");
    check(setup_q == '0, "setup all zeros written");
    shift(0, SETUP_W, '1, o);
    check(o[SETUP_W-1:0] == '0, "setup all zeros read");
    shift(0, SETUP_W, 64'h0, o);
    check(o[SETUP_W-1:0] == {SETUP_W{1'b1}}, "setup all ones read");
    s = setup_t'({$urandom, $urandom});
    shift(0, SETUP_W, 64'(s), o);
    shift(0, SETUP_W, 64'(s), o);
    check(o[SETUP_W-1:0] == s && setup_q == s, "setup normal value");
    shift(1, 4, 64'h3, o);
    shift(0, CONTROL_W, 64'h1, o);
    check(control_q == control_t'(2'b01), "control written");
    shift(1, 4, 64'h4, o);
    shift(0, STATUS_W, '0, o);
    check(o[STATUS_W-1:0] == status, "status read");
    check(setup_q == s && control_q == control_t'(2'b01), "status read writes nothing");
    shift(1, 4, 64'hF, o);
    shift(0, 8, 64'hA5, o);
    check(o[7:0] == 8'h4A, "bypass one-bit delay");
    // test-logic-reset restores IDCODE
    repeat (5) step(1);
    step(0);
    shift(0, 32, '0, o);
    check(o[31:0] == ID, "IDCODE after TLR");
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
