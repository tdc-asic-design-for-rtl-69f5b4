// tdc_hit_builder_tb: feeds edge strobes to the hit builder of channel 19
// and checks the words: pair mode with the leading times and widths of the
// chip's own post-layout simulation printout (e.g. leading 0x04a4d, width
// 145), width saturation, an unpaired trailing edge, edge mode with each
// polarity and with both edges in the same cycle, and the channel enable.
module tdc_hit_builder_tb;
  timeunit 1ps;
  timeprecision 1ps;
  import tdc_pkg::*;
  int checks = 0, failures = 0;
  logic      clk = 0, rst_n = 0;
  logic      enable = 1, pair_mode = 1, rise_en = 1, fall_en = 1;
  logic      rise_v = 0, fall_v = 0;
  tdc_time_t rise_t = '0, fall_t = '0;
  logic      word_v;
  rdo_word_t word;
  rdo_word_t got[$];

  tdc_hit_builder #(.CH_ID(5'd19)) dut (.clk, .rst_n, .enable, .pair_mode, .rise_en,
    .fall_en, .rise_v, .rise_t, .fall_v, .fall_t, .word_v, .word);

  always #3200 clk = !clk;
  always @(posedge clk) if (word_v) got.push_back(word);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic edge_in(input bit rise, input bit fall, input logic [16:0] tr, input logic [16:0] tf);
    @(negedge clk);
    rise_v = rise; fall_v = fall; rise_t = tr; fall_t = tf;
    @(negedge clk);
    rise_v = 0; fall_v = 0;
  endtask

  task automatic expect_word(input logic [31:0] data, input bit three, input string what);
    repeat (3) @(posedge clk);
    checks++;
    if (got.size() != 1 || got[0].data != data || got[0].three_bytes != three) begin
      failures++;
      $display("FAIL %s: %0d words, first %h, expected %h", what, got.size(),
               got.size() ? got[0].data : 32'h0, data);
    end
    got.delete();
  endtask

  logic [16:0] lead_list [4] = '{17'h04a4d, 17'h04c76, 17'h04ca7, 17'h050c9};
  int          width_list[4] = '{145, 172, 155, 139};

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // pair mode, values from the chip's simulation printout
    for (int i = 0; i < 4; i++) begin
      edge_in(1, 0, lead_list[i], 0);
      edge_in(0, 1, 0, lead_list[i] + 17'(width_list[i]));
      expect_word({5'd19, 2'b11, lead_list[i], 8'(width_list[i])}, 0, "pair word");
    end
    // latency: word one cycle after the trailing edge
    edge_in(1, 0, 17'h100, 0);
    @(negedge clk); fall_v = 1; fall_t = 17'h120;
    @(posedge clk); #1 fall_v = 0;
    check(word_v && word.data[7:0] == 8'h20, "pair word registered at the trailing edge's clock");
    repeat (2) @(posedge clk); got.delete();
    // width saturation and wrap of the 17-bit time
    edge_in(1, 0, 17'h1FFF0, 0);
    edge_in(0, 1, 0, 17'h00100);
    expect_word({5'd19, 2'b11, 17'h1FFF0, 8'hFF}, 0, "saturated width across wrap");
    edge_in(1, 0, 17'h1FFF0, 0);
    edge_in(0, 1, 0, 17'h00010);
    expect_word({5'd19, 2'b11, 17'h1FFF0, 8'd32}, 0, "width across wrap");
    // unpaired trailing edge: nothing
    edge_in(0, 1, 0, 17'h300);
    repeat (3) @(posedge clk);
    check(got.size() == 0, "no word for a lone trailing edge");
    // edge mode
    pair_mode = 0;
    edge_in(1, 0, 17'h00244, 0);
    expect_word({5'd19, 2'b01, 17'h00244, 8'h00}, 1, "edge mode leading");
    edge_in(0, 1, 0, 17'h00421);
    expect_word({5'd19, 2'b10, 17'h00421, 8'h00}, 1, "edge mode trailing");
    edge_in(1, 1, 17'h0063a, 17'h0063b);
    repeat (3) @(posedge clk);
    check(got.size() == 2 && got[0].data[26:25] == 2'b01 && got[1].data[26:25] == 2'b10 &&
          got[1].data[24:8] == 17'h0063b, "both edges in one cycle: leading first");
    got.delete();
    rise_en = 0;
    edge_in(1, 1, 17'h700, 17'h701);
    expect_word({5'd19, 2'b10, 17'h00701, 8'h00}, 1, "leading edges disabled");
    // channel disabled
    enable = 0; rise_en = 1;
    edge_in(1, 1, 17'h800, 17'h801);
    repeat (3) @(posedge clk);
    check(got.size() == 0, "disabled channel silent");
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
