// tdc_serial_interface_tb: feeds a mix of three- and four-byte words from a
// FIFO model, rebuilds the 10-bit symbols of both lanes from the two-bit
// outputs, decodes them and merges the lanes (lane 0 then lane 1 in each
// symbol period, commas dropped). The byte stream must equal the words'
// bytes, most significant first. Also checks the symbol period (five
// cycles), that idle lanes send K28.5, and the throughput of two bytes per
// symbol period while the FIFO is never empty.
module tdc_serial_interface_tb;
  timeunit 1ps;
  timeprecision 1ps;
  import tdc_pkg::*;
  import tb_8b10b_pkg::*;
  int checks = 0, failures = 0;
  logic            clk = 0, rst_n = 0, fifo_empty, fifo_rd, symbol_start;
  rdo_word_t       fifo_data;
  logic [1:0][1:0] dout;
  rdo_word_t       q[$];
  logic [7:0]      exp_bytes[$], got_bytes[$];
  logic [1:0][9:0] sym;
  int              pairs = 0, symbols = 0, commas = 0, bad = 0, period_err = 0, since = 0;

  tdc_serial_interface dut (.clk, .rst_n, .fifo_empty, .fifo_data, .fifo_rd, .dout, .symbol_start);

  always #3200 clk = !clk;

  always @(negedge clk) begin
    fifo_empty = (q.size() == 0);
    fifo_data  = q.size() ? q[0] : '0;
  end

  always @(posedge clk) if (rst_n) begin
    if (fifo_rd) void'(q.pop_front());
    since++;
    if (symbol_start) begin
      if (since != 5 && symbols > 0) period_err++;
      since = 0;
      pairs = 0;
    end
    for (int l = 0; l < 2; l++) sym[l] = {sym[l][7:0], dout[l]};
    pairs++;
    if (pairs == 5) begin
      symbols++;
      for (int l = 0; l < 2; l++) begin
        logic [7:0] d;
        bit kk;
        if (!decode(sym[l], d, kk)) bad++;
        else if (kk) commas++;
        else got_bytes.push_back(d);
      end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic add_word();
    rdo_word_t w;
    w.three_bytes = $urandom % 2;
    w.data = $urandom;
    if (w.three_bytes) w.data[7:0] = 8'h00;
    q.push_back(w);
    for (int b = 0; b < (w.three_bytes ? 3 : 4); b++) exp_bytes.push_back(w.data[31 - 8*b -: 8]);
  endtask

  initial begin
    fifo_empty = 1; fifo_data = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (50) @(posedge clk);
    check(commas > 10 && got_bytes.size() == 0, "idle lanes send commas");
    // sustained load: keep the FIFO topped up for 200 symbol periods
    begin
      int s0, b0;
      @(posedge clk iff symbol_start);
      s0 = symbols; b0 = got_bytes.size();
      repeat (1000) begin
        @(negedge clk);
        while (q.size() < 8) add_word();
      end
      check(got_bytes.size() - b0 >= 2 * (symbols - s0) - 4, $sformatf("throughput: %0d bytes in %0d symbols",
            got_bytes.size() - b0, symbols - s0));
    end
    // sparse traffic
    repeat (200) begin
      @(negedge clk);
      if ($urandom % 8 == 0) add_word();
    end
    repeat (400) @(posedge clk);
    check(bad == 0, $sformatf("%0d invalid symbols", bad));
    check(period_err == 0, "symbol period of five cycles");
    check(got_bytes.size() == exp_bytes.size(), $sformatf("byte count %0d vs %0d", got_bytes.size(), exp_bytes.size()));
    for (int i = 0; i < got_bytes.size() && i < exp_bytes.size(); i++)
      check(got_bytes[i] == exp_bytes[i], $sformatf("byte %0d: %h expected %h", i, got_bytes[i], exp_bytes[i]));
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
