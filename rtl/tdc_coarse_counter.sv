// tdc_coarse_counter: 15-bit coarse time counter at 320 MHz.
//
// Counts 320 MHz cycles (3.125 ns each); with the 2-bit interpolated fine
// time this gives 0.78 ns bins over a 102.4 us range before the count wraps.
// A bunch count reset (bcr) arrives from the 160 MHz logic as a pulse of at
// least one 160 MHz cycle; it is synchronised with two flip-flops and its
// rising edge loads zero. Every edge sampler has its own copy (48 in all).
//
// Timing: the count shown during a 320 MHz cycle is the value loaded at the
// cycle's start; zero appears three cycles after bcr rises. The width and
// the clock follow the chip; the reset synchroniser is this design's own.
module tdc_coarse_counter
  import tdc_pkg::*;
(
  input  logic                clk320,
  input  logic                rst_n,
  input  logic                bcr,
  output logic [COARSE_W-1:0] coarse
);
  logic [2:0] bcr_sync;

  always_ff @(posedge clk320 or negedge rst_n) begin
    if (!rst_n) begin
      bcr_sync <= '0;
      coarse   <= '0;
    end else begin
      bcr_sync <= {bcr_sync[1:0], bcr};
      if (bcr_sync[1] && !bcr_sync[2]) coarse <= '0;
      else                             coarse <= coarse + 1'b1;
    end
  end
endmodule
