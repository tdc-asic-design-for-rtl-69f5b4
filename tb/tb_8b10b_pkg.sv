// tb_8b10b_pkg: 8b/10b decoding for the testbenches. A received 10-bit
// symbol (bit a first, in bit 9) is split into its 6-bit and 4-bit groups,
// each looked up in the standard code tables in both disparities. Only
// K28.5 is recognised as a control symbol.
package tb_8b10b_pkg;

  localparam logic [5:0] T6 [32] = '{
    6'b100111, 6'b011101, 6'b101101, 6'b110001, 6'b110101, 6'b101001, 6'b011001, 6'b111000,
    6'b111001, 6'b100101, 6'b010101, 6'b110100, 6'b001101, 6'b101100, 6'b011100, 6'b010111,
    6'b011011, 6'b100011, 6'b010011, 6'b110010, 6'b001011, 6'b101010, 6'b011010, 6'b111010,
    6'b110011, 6'b100110, 6'b010110, 6'b110110, 6'b001110, 6'b101110, 6'b011110, 6'b101011
  };
  localparam logic [3:0] T4 [8] = '{
    4'b1011, 4'b1001, 4'b0101, 4'b1100, 4'b1101, 4'b1010, 4'b0110, 4'b1110
  };

  // Returns 1 when the symbol is a valid data symbol or K28.5.
  function automatic bit decode(input logic [9:0] code, output logic [7:0] data, output bit k);
    bit ok6 = 0, ok4 = 0;
    logic [4:0] x = '0;
    logic [2:0] y = '0;
    k = 0; data = '0;
    if (code == 10'b0011111010 || code == 10'b1100000101) begin
      k = 1; data = 8'hBC; return 1;
    end
    for (int i = 0; i < 32; i++) begin
      bit alt;
      alt = ($countones(T6[i]) != 3) || i == 7;
      if (code[9:4] == T6[i] || (alt && code[9:4] == ~T6[i])) begin ok6 = 1; x = 5'(i); end
    end
    for (int i = 0; i < 8; i++) begin
      bit alt;
      alt = ($countones(T4[i]) != 2) || i == 3;
      if (code[3:0] == T4[i] || (alt && code[3:0] == ~T4[i])) begin ok4 = 1; y = 3'(i); end
    end
    if (code[3:0] == 4'b0111 || code[3:0] == 4'b1000) begin ok4 = 1; y = 3'd7; end
    data = {y, x};
    return ok6 && ok4;
  endfunction

endpackage
