// tdc_edge_sampler: four-phase time interpolator for one edge polarity.
//
// The hit signal is sampled by four flip-flops clocked on the rising and
// falling edges of the 0-degree and 90-degree 320 MHz clocks, i.e. at 0,
// T/4, T/2 and 3T/4 of each 3.125 ns cycle. At the next 0-degree edge the
// four samples are moved into one 4-bit word together with the coarse count
// of that cycle. A rising edge is found where a sample is 1 and the sample
// before it (the previous word's last sample for the first phase) is 0; the
// index of that sample is the 2-bit fine time. The falling-edge sampler is
// the same block fed with the inverted hit. Only the first edge in a cycle
// is kept.
//
// Interface: ev_time holds the latest edge time {coarse, fine}; ev_toggle
// changes each time a new edge is stored, for the 160 MHz logic to pick up
// through a synchroniser. Timing: ev_time/ev_toggle update two 320 MHz
// cycles after the sample that saw the edge. The four-phase sampling, the
// 2-bit fine and 15-bit coarse split follow the chip; the encoder and the
// toggle handshake are this design's own.
module tdc_edge_sampler
  import tdc_pkg::*;
(
  input  logic                clk320,     // 320 MHz, 0 degrees
  input  logic                clk320_90,  // 320 MHz, 90 degrees
  input  logic                rst_n,
  input  logic                hit,
  input  logic [COARSE_W-1:0] coarse,     // clk320 domain
  output tdc_time_t           ev_time,
  output logic                ev_toggle
);
  logic s0, s1, s2, s3;        // samples at 0, T/4, T/2, 3T/4
  logic [3:0]          word;
  logic                prev;   // last sample of the previous word
  logic [COARSE_W-1:0] word_coarse;
  logic                found;
  logic [FINE_W-1:0]   fine;

  always_ff @(posedge clk320)    s0 <= hit;
  always_ff @(posedge clk320_90) s1 <= hit;
  always_ff @(negedge clk320)    s2 <= hit;
  always_ff @(negedge clk320_90) s3 <= hit;

  always_ff @(posedge clk320 or negedge rst_n) begin
    if (!rst_n) begin
      word        <= 4'b1111;   // no edge is seen right after reset
      prev        <= 1'b1;
      word_coarse <= '0;
    end else begin
      word        <= {s3, s2, s1, s0};
      prev        <= word[3];
      word_coarse <= coarse;
    end
  end

  // First 0 -> 1 transition in {prev, s0, s1, s2, s3}.
  always_comb begin
    found = 1'b0;
    fine  = '0;
    for (int i = 3; i >= 0; i--) begin
      if (word[i] && !((i == 0) ? prev : word[(i == 0) ? 0 : i - 1])) begin
        found = 1'b1;
        fine  = FINE_W'(i);
      end
    end
  end

  always_ff @(posedge clk320 or negedge rst_n) begin
    if (!rst_n) begin
      ev_time   <= '0;
      ev_toggle <= 1'b0;
    end else if (found) begin
      ev_time   <= '{coarse: word_coarse, fine: fine};
      ev_toggle <= !ev_toggle;
    end
  end
endmodule
