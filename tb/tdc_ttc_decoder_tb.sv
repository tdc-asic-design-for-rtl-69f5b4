// tdc_ttc_decoder_tb: sends random TTC commands (start bit + three command
// bits) separated by random idle gaps, some back to back, and checks each
// decoded strobe, its timing (one cycle after the last command bit) and that
// nothing else is decoded. Also injects register upsets into one copy of the
// triplicated state during a command.
module tdc_ttc_decoder_tb;
  timeunit 1ps;
  timeprecision 1ps;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, ttc = 0;
  logic trigger, bcr, ecr, master_reset;
  int   n_strobes = 0;

  tdc_ttc_decoder dut (.clk, .rst_n, .ttc, .trigger, .bcr, .ecr, .master_reset);

  always #3200 clk = !clk;
  always @(posedge clk) if (rst_n) n_strobes += int'(trigger) + int'(bcr) + int'(ecr) + int'(master_reset);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int expected = 0;
  int seen_mr = 0, seen_combo = 0;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      logic [2:0] cmd;
      int n_prev;
      cmd = 3'($urandom);
      if (cmd == 0) cmd = 3'b001;
      @(negedge clk); ttc = 1;
      @(negedge clk); ttc = cmd[2];
      if (n % 10 == 3) begin
        force dut.u_state.g_copy[2].r = ~dut.u_state.g_copy[2].r;
        #100 release dut.u_state.g_copy[2].r;
      end
      @(negedge clk); ttc = cmd[1];
      @(negedge clk); ttc = cmd[0];
      n_prev = n_strobes;
      @(posedge clk); #1;                // last command bit sampled here
      check(n_strobes == n_prev, "no strobe while the command is received");
      if (cmd == 3'b111) begin
        check(master_reset && !trigger && !bcr && !ecr, "master reset");
        seen_mr++;
        expected += 1;
      end else begin
        check(!master_reset && trigger == cmd[0] && bcr == cmd[1] && ecr == cmd[2], "command bits");
        if ($countones(cmd) > 1) seen_combo++;
        expected += $countones(cmd);
      end
      ttc = 0;
      if (n % 3 != 0) repeat ($urandom % 5) @(negedge clk);
      else #1;
    end
    repeat (4) @(posedge clk); #1;
    check(n_strobes == expected, $sformatf("strobe count %0d, expected %0d", n_strobes, expected));
    check(seen_mr > 0 && seen_combo > 0, "all command kinds sent");
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
