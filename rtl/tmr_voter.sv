// tmr_voter: bitwise 2-out-of-3 majority voter.
//
// Each output bit is the value held by at least two of the three inputs, so
// one corrupted copy of a triplicated register never reaches the output.
// Purely combinational. The voter itself is the element of the triple
// modular redundancy scheme; its gate-level form is this design's own.
module tmr_voter #(
  parameter int unsigned WIDTH = 1
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] c,
  output logic [WIDTH-1:0] y
);
  always_comb y = (a & b) | (b & c) | (a & c);
endmodule
