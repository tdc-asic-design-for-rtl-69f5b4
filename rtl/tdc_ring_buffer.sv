// tdc_ring_buffer: per-channel circular store of recent hits (triggered mode).
//
// In triggered mode every hit word of the channel is written here, at the
// write pointer, which then advances; once the 16 places are used the
// oldest word is overwritten. Nothing is removed by reading, so a hit can
// belong to several overlapping trigger windows. A valid bit per place tells
// written places from those never written since reset.
//
// Interface: one write port (wr_en, wdata) and one asynchronous read port
// (rd_idx -> rd_valid, rd_data); wptr is the next place to be written, i.e.
// the oldest word once the buffer has wrapped. Timing: a word can be read
// the cycle after it is written. The 16-word depth follows the chip; the
// valid bits and the read port are this design's own.
module tdc_ring_buffer
  import tdc_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  rdo_word_t                wdata,
  input  logic [$clog2(DEPTH)-1:0] rd_idx,
  output logic                     rd_valid,
  output rdo_word_t                rd_data,
  output logic [$clog2(DEPTH)-1:0] wptr
);
  rdo_word_t        mem [DEPTH];
  logic [DEPTH-1:0] valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      valid <= '0;
    end else if (wr_en) begin
      wptr        <= wptr + 1'b1;
      valid[wptr] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wptr] <= wdata;
  end

  assign rd_valid = valid[rd_idx];
  assign rd_data  = mem[rd_idx];
endmodule
