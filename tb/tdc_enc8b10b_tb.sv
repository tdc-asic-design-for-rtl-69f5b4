// tdc_enc8b10b_tb: known code words from the standard tables (D.0.0,
// D.7.0, D.17.7, D.21.5, D.23.7, K28.5), then for every byte and both
// disparities: the symbol decodes back to the byte, has 4-6 ones with the
// sign the running disparity demands, and updates the disparity correctly;
// all 256 symbols of a disparity are distinct; and a long random stream
// never has a run of more than five equal bits.
module tdc_enc8b10b_tb;
  timeunit 1ps;
  timeprecision 1ps;
  import tb_8b10b_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] data;
  logic       k, rd_in, rd_out;
  logic [9:0] code;

  tdc_enc8b10b dut (.data, .k, .rd_in, .code, .rd_out);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic kat(input logic [7:0] d, input bit kk, input bit rd, input logic [9:0] exp_code);
    data = d; k = kk; rd_in = rd; #1;
    check(code == exp_code, $sformatf("byte %h k=%0d rd=%0d: %b expected %b", d, kk, rd, code, exp_code));
  endtask

  initial begin
    kat(8'h00, 0, 0, 10'b100111_0100);   // D.0.0, RD-
    kat(8'h00, 0, 1, 10'b011000_1011);   // D.0.0, RD+
    kat(8'h07, 0, 0, 10'b111000_1011);   // D.7.0, RD-
    kat(8'hF1, 0, 0, 10'b100011_0111);   // D.17.7, RD- (alternate)
    kat(8'hB5, 0, 0, 10'b101010_1010);   // D.21.5
    kat(8'hF7, 0, 0, 10'b111010_0001);   // D.23.7, RD-
    kat(8'hBC, 1, 0, 10'b001111_1010);   // K28.5, RD-
    kat(8'hBC, 1, 1, 10'b110000_0101);   // K28.5, RD+
    for (int r = 0; r < 2; r++) begin
      bit seen [1024];
      for (int i = 0; i < 1024; i++) seen[i] = 0;
      for (int b = 0; b < 256; b++) begin
        logic [7:0] dd;
        bit kk, ok;
        int ones;
        data = 8'(b); k = 0; rd_in = r[0]; #1;
        ok = decode(code, dd, kk);
        check(ok && !kk && dd == 8'(b), $sformatf("decode %h rd=%0d -> %b", b, r, code));
        ones = $countones(code);
        check(r == 0 ? (ones == 5 || ones == 6) : (ones == 5 || ones == 4), "disparity sign");
        check(rd_out == (ones == 5 ? rd_in : !rd_in), "running disparity update");
        check(!seen[code], "distinct symbols");
        seen[code] = 1;
      end
    end
    begin
      bit   rd = 0, last;
      int   run = 0, maxrun = 0, disp;
      disp = -1;
      last = 0;
      for (int n = 0; n < 5000; n++) begin
        data = 8'($urandom); k = ($urandom % 8) == 0; rd_in = rd; #1;
        for (int i = 9; i >= 0; i--) begin
          if (code[i] == last) run++; else run = 1;
          last = code[i];
          if (run > maxrun) maxrun = run;
          disp += code[i] ? 1 : -1;
        end
        // the bit balance of the stream equals the running disparity
        check(disp == (rd_out ? 1 : -1), "stream disparity bounded");
        rd = rd_out;
      end
      check(maxrun <= 5, $sformatf("run length %0d", maxrun));
    end
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
