// tmr_fsm_reg_tb: builds a small triplicated state machine on the cell (an
// 8-bit counter that adds a step input, with three copies of the adder)
// and checks it against a model while injecting faults: a flipped bit in
// one register copy, a wrong value from one copy of the next-state logic,
// and both in the same copy. All three voted outputs must follow the model
// throughout, and an upset copy must hold the right value again after its
// next clock edge.
module tmr_fsm_reg_tb;
  timeunit 1ps;
  timeprecision 1ps;

  int checks = 0, failures = 0;
  logic       clk = 0, rst_n = 0;
  logic [7:0] step = 0;
  logic [7:0] d [3], q [3];
  logic [7:0] model;
  logic [2:0] bad_logic = '0;    // corrupt copy i of the next-state logic

  tmr_fsm_reg #(.WIDTH(8), .RESET_VAL(8'h5A)) dut (.clk({3{clk}}), .rst_n, .d, .q);

  for (genvar i = 0; i < 3; i++) begin : g_logic
    assign d[i] = bad_logic[i] ? 8'hFF ^ (q[i] + step) : q[i] + step;
  end

  always #5000 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // the model advances on every rising clock edge after reset
  always @(posedge clk or negedge rst_n)
    if (!rst_n) model <= 8'h5A;
    else        model <= model + step;

  // outputs checked just before every rising edge
  always @(negedge clk) if (rst_n)
    for (int i = 0; i < 3; i++)
      check(q[i] == model, $sformatf("q[%0d]=%h model %h", i, q[i], model));

  initial begin
    #12000 rst_n = 1;
    check(q[0] == 8'h5A && q[1] == 8'h5A && q[2] == 8'h5A, "reset value");
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      #1000 step = 8'($urandom);
      case (n % 4)
        0: begin   // register upset in one copy
             automatic int c = $urandom % 3;
             case (c)
               0: begin force dut.g_copy[0].r = dut.g_copy[0].r ^ 8'h10; #100 release dut.g_copy[0].r; end
               1: begin force dut.g_copy[1].r = dut.g_copy[1].r ^ 8'h01; #100 release dut.g_copy[1].r; end
               default: begin force dut.g_copy[2].r = dut.g_copy[2].r ^ 8'h80; #100 release dut.g_copy[2].r; end
             endcase
             @(posedge clk); #1;
             check(dut.g_copy[0].r == model && dut.g_copy[1].r == model && dut.g_copy[2].r == model,
                   "upset copy rewritten");
           end
        1: begin   // transient in one copy of the logic for one edge
             bad_logic = 3'b001 << ($urandom % 3);
             @(posedge clk); #1 bad_logic = '0;
             @(posedge clk); #1;
             check(dut.g_copy[0].r == model && dut.g_copy[1].r == model && dut.g_copy[2].r == model,
                   "copy loaded from bad logic rewritten");
           end
        default: ;
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
