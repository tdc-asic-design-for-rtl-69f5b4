// tdc_enc8b10b: 8b/10b encoder (IBM code) with running disparity.
//
// The byte HGF EDCBA is coded as a 6-bit group abcdei from EDCBA and a
// 4-bit group fghj from HGF. Each group has a code for negative running
// disparity; an unbalanced code (and the balanced D.07 and D.x.3 codes) is
// complemented when the running disparity is positive, and an unbalanced
// group flips the disparity. D.x.7 uses the alternate code A7 where the
// primary one would make a run of five equal bits. The only control symbol
// is the comma K28.5, selected by k (the data input is then ignored).
//
// Interface: purely combinational; rd_in is the running disparity before
// the symbol (1 = positive), rd_out after it. code[9] is bit a, the first
// one sent. The chip names 8b/10b coding and K28.5 as its comma; the code
// tables are the standard ones.
module tdc_enc8b10b (
  input  logic [7:0] data,
  input  logic       k,
  input  logic       rd_in,
  output logic [9:0] code,
  output logic       rd_out
);
  logic [4:0] x;
  logic [2:0] y;
  logic [5:0] c6;
  logic [3:0] c4;
  logic       rd_mid;
  logic       comp6, comp4, alt7;

  assign x = data[4:0];
  assign y = data[7:5];

  // 5b/6b codes for negative running disparity.
  always_comb begin
    unique case (x)
      5'd0:  c6 = 6'b100111;  5'd1:  c6 = 6'b011101;
      5'd2:  c6 = 6'b101101;  5'd3:  c6 = 6'b110001;
      5'd4:  c6 = 6'b110101;  5'd5:  c6 = 6'b101001;
      5'd6:  c6 = 6'b011001;  5'd7:  c6 = 6'b111000;
      5'd8:  c6 = 6'b111001;  5'd9:  c6 = 6'b100101;
      5'd10: c6 = 6'b010101;  5'd11: c6 = 6'b110100;
      5'd12: c6 = 6'b001101;  5'd13: c6 = 6'b101100;
      5'd14: c6 = 6'b011100;  5'd15: c6 = 6'b010111;
      5'd16: c6 = 6'b011011;  5'd17: c6 = 6'b100011;
      5'd18: c6 = 6'b010011;  5'd19: c6 = 6'b110010;
      5'd20: c6 = 6'b001011;  5'd21: c6 = 6'b101010;
      5'd22: c6 = 6'b011010;  5'd23: c6 = 6'b111010;
      5'd24: c6 = 6'b110011;  5'd25: c6 = 6'b100110;
      5'd26: c6 = 6'b010110;  5'd27: c6 = 6'b110110;
      5'd28: c6 = 6'b001110;  5'd29: c6 = 6'b101110;
      5'd30: c6 = 6'b011110;  default: c6 = 6'b101011;
    endcase
  end

  // D.x.7 takes the alternate code when the 6-bit group ends in two equal
  // bits that the primary code would extend to a run of five.
  assign alt7 = (y == 3'd7) &&
                ((!rd_mid && (x == 5'd17 || x == 5'd18 || x == 5'd20)) ||
                 ( rd_mid && (x == 5'd11 || x == 5'd13 || x == 5'd14)));

  // 3b/4b codes for negative running disparity.
  always_comb begin
    unique case (y)
      3'd0: c4 = 4'b1011;
      3'd1: c4 = 4'b1001;
      3'd2: c4 = 4'b0101;
      3'd3: c4 = 4'b1100;
      3'd4: c4 = 4'b1101;
      3'd5: c4 = 4'b1010;
      3'd6: c4 = 4'b0110;
      default: c4 = alt7 ? 4'b0111 : 4'b1110;
    endcase
  end

  assign comp6  = rd_in  && (($countones(c6) != 3) || x == 5'd7);
  assign rd_mid = ($countones(c6) != 3) ? !rd_in : rd_in;
  assign comp4  = rd_mid && (($countones(c4) != 2) || y == 3'd3);

  always_comb begin
    if (k) begin
      // K28.5: 001111 1010 (negative) or 110000 0101 (positive).
      code   = rd_in ? 10'b1100000101 : 10'b0011111010;
      rd_out = !rd_in;
    end else begin
      code   = {comp6 ? ~c6 : c6, comp4 ? ~c4 : c4};
      rd_out = ($countones(c4) != 2) ? !rd_mid : rd_mid;
    end
  end
endmodule
