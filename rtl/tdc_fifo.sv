// tdc_fifo: synchronous first-in first-out buffer with optional TMR pointers.
//
// Holds DEPTH words of WIDTH bits in a register array. The read side is
// show-ahead: rdata is the oldest word whenever empty is low, and rd_en
// removes it. A write while full is dropped and flagged on ovf for that
// cycle. With TMR set, the read and write pointers are triplicated
// together with their update logic (tmr_fsm_reg: three copies of the logic
// and of the registers, copy i fed by voter i), which protects the flow control against single-event upsets
// while the data words stay single copies.
//
// The chip uses it as the 4-word channel FIFO and the 16-word readout FIFO
// (both with triplicated pointers) and as the 16-word trigger FIFO. The
// depths and the choice of what to triplicate follow the chip; the
// show-ahead read and the drop-on-full policy are this design's own.
module tdc_fifo #(
  parameter int unsigned WIDTH = 33,
  parameter int unsigned DEPTH = 4,
  parameter bit          TMR   = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wdata,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rdata,
  output logic             empty,
  output logic             full,
  output logic             ovf
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr, rptr;
  logic             do_wr, do_rd;

  assign empty = (wptr == rptr);
  assign full  = (wptr[AW] != rptr[AW]) && (wptr[AW-1:0] == rptr[AW-1:0]);
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;
  assign ovf   = wr_en && full;
  assign rdata = mem[rptr[AW-1:0]];

  if (TMR) begin : g_tmr
    // Three copies of the pointer logic, copy i fed by voter i; the
    // FIFO's outputs come from copy 0 (wptr, rptr above).
    logic [2*(AW+1)-1:0] p_q [3], p_d [3];
    for (genvar i = 0; i < 3; i++) begin : g_logic
      logic [AW:0] w, r;
      logic        f, e;
      assign {w, r} = p_q[i];
      assign f      = (w[AW] != r[AW]) && (w[AW-1:0] == r[AW-1:0]);
      assign e      = (w == r);
      assign p_d[i] = {(wr_en && !f) ? w + 1'b1 : w,
                       (rd_en && !e) ? r + 1'b1 : r};
    end
    tmr_fsm_reg #(.WIDTH(2*(AW+1))) u_ptrs (
      .clk({3{clk}}), .rst_n(rst_n), .d(p_d), .q(p_q)
    );
    assign {wptr, rptr} = p_q[0];
  end else begin : g_plain
    logic [AW:0] wptr_d, rptr_d;
    always_comb begin
      wptr_d = do_wr ? wptr + 1'b1 : wptr;
      rptr_d = do_rd ? rptr + 1'b1 : rptr;
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) {wptr, rptr} <= '0;
      else        {wptr, rptr} <= {wptr_d, rptr_d};
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr[AW-1:0]] <= wdata;
  end

  // A read is only requested when a word is there.
  assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> !empty)
    else $error("tdc_fifo: read while empty");

  initial begin
    assert (DEPTH >= 2 && (1 << AW) == DEPTH)
      else $fatal(1, "tdc_fifo: DEPTH must be a power of two >= 2");
  end
endmodule
