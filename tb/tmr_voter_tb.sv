// tmr_voter_tb: checks the majority voter on random 16-bit operands and on
// all single-copy upsets; the expected value is counted bit by bit.
module tmr_voter_tb;
  timeunit 1ps;
  timeprecision 1ps;
  int checks = 0, failures = 0;
  logic [15:0] a, b, c, y, exp_y;

  tmr_voter #(.WIDTH(16)) dut (.a, .b, .c, .y);

  initial begin
    for (int n = 0; n < 2000; n++) begin
      a = 16'($urandom); b = 16'($urandom); c = 16'($urandom);
      if (n % 4 == 1) b = a ^ (16'h1 << (n % 16));        // one copy upset
      if (n % 4 == 2) c = a;
      #1;
      for (int i = 0; i < 16; i++)
        exp_y[i] = (int'(a[i]) + int'(b[i]) + int'(c[i])) >= 2;
      checks++;
      if (y !== exp_y) begin
        failures++;
        $display("voter mismatch a=%h b=%h c=%h y=%h exp=%h", a, b, c, y, exp_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
