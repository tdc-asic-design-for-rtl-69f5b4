// tmr_reg_tb: drives a triplicated 8-bit register and injects the three
// kinds of single-event effect used to qualify the chip's TMR cells: a bit
// flip forced into one copy, a missing clock on one copy and a glitch
// (extra edge) on one copy. The output must never show the fault and the
// upset copy must be rewritten with the voted value at its next edge.
module tmr_reg_tb;
  timeunit 1ps;
  timeprecision 1ps;
  int checks = 0, failures = 0;
  logic [2:0] clk;
  logic       rst_n, en;
  logic [7:0] d, q, model;
  bit         stop_b = 0;
  bit         glitch_c = 0;

  tmr_reg #(.WIDTH(8), .RESET_VAL(8'h5A)) dut (.clk, .rst_n, .en, .d, .q);

  initial clk = '0;
  // Copies 1 and 2 follow clock 0 unless a missing edge or a glitch is
  // being injected.
  always #5000 clk[0] = !clk[0];
  always @(clk[0] or stop_b) clk[1] = stop_b ? 1'b0 : clk[0];
  always @(clk[0] or glitch_c) begin
    if (glitch_c) begin
      clk[2] = 1'b0; #200 clk[2] = 1'b1; #200 clk[2] = 1'b0;
    end else begin
      clk[2] = clk[0];
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: q=%h model=%h copies=%h/%h/%h", what, q, model,
               dut.g_copy[0].r, dut.g_copy[1].r, dut.g_copy[2].r);
    end
  endtask

  initial begin
    rst_n = 0; en = 0; d = '0;
    #12000 rst_n = 1;
    model = 8'h5A;
    check(q == 8'h5A, "reset value");
    // plain writes
    for (int n = 0; n < 20; n++) begin
      @(negedge clk[0]);
      en = ($urandom % 2) == 1; d = 8'($urandom);
      @(posedge clk[0]); #1;
      if (en) model = d;
      check(q == model, "write");
    end
    @(negedge clk[0]); en = 0;
    // register upset in copy 1
    for (int n = 0; n < 8; n++) begin
      @(negedge clk[0]);
      force dut.g_copy[1].r = model ^ (8'h1 << n);
      #100 release dut.g_copy[1].r;
      #1 check(q == model, "output during upset");
      @(posedge clk[0]); #1;
      check(dut.g_copy[1].r == model, "upset copy scrubbed");
    end
    // two copies upset in different bits: voting still recovers
    @(negedge clk[0]);
    force dut.g_copy[0].r = model ^ 8'h01;
    force dut.g_copy[2].r = model ^ 8'h80;
    #100 release dut.g_copy[0].r; release dut.g_copy[2].r;
    #1 check(q == model, "output with two copies upset in different bits");
    @(posedge clk[0]); #1;
    check(dut.g_copy[0].r == model && dut.g_copy[2].r == model, "both copies scrubbed");
    // missing clock on copy 1 during a write
    @(negedge clk[0]); stop_b = 1; en = 1; d = ~model;
    @(posedge clk[0]); #1; model = d;
    check(q == model, "write with one clock missing");
    @(negedge clk[0]); en = 0;
    @(posedge clk[0]); #1;
    stop_b = 0;
    repeat (2) @(posedge clk[0]); #1;
    check(dut.g_copy[1].r == model, "copy with missing clock recovered");
    // glitch on copy 2 while d changes
    @(negedge clk[0]); en = 1; d = model + 8'd3;
    glitch_c = 1; #1000 glitch_c = 0;
    #10 check(q == model, "glitch does not reach the output");
    @(posedge clk[0]); #1; model = d;
    check(q == model, "write after glitch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
