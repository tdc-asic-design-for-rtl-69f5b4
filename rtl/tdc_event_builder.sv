// tdc_event_builder: assembles one event per trigger in triggered mode.
//
// It takes the oldest trigger from the trigger FIFO, broadcasts its coarse
// time to all channels' trigger matchers (start strobe), and writes a
// header word {5'h1E, trigger coarse time (15 b), event id (12 b)}. It then
// visits the channels in order 0..N-1: it moves words from a channel's FIFO
// to the readout FIFO until that channel's matcher has finished and its
// FIFO is empty, so the 4-word channel FIFOs never need to hold a whole
// event. Last comes a trailer {5'h1F, 3'b0, event id, hit count (12 b)}.
// One event is built at a time; the next trigger waits in the trigger FIFO.
//
// Timing: at most one word per cycle; the per-channel visit costs one
// cycle for a channel without hits. The state machine is triplicated with
// three copies of its next-state logic (tmr_fsm_reg), outputs from copy 0. The
// event builder's place in the chip is given; the header/trailer layout and
// the channel order are this design's own.
module tdc_event_builder
  import tdc_pkg::*;
#(
  parameter int unsigned N = NUM_CH
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                enable,
  // trigger FIFO
  input  logic                trig_empty,
  input  trig_rec_t           trig_data,
  output logic                trig_rd,
  // to the channel matchers
  output logic                match_start,
  output logic [COARSE_W-1:0] match_coarse,
  input  logic [N-1:0]        match_busy,
  // channel FIFOs
  input  logic [N-1:0]        ch_empty,
  input  rdo_word_t           ch_data [N],
  output logic [N-1:0]        ch_rd,
  // readout FIFO
  output logic                out_v,
  output rdo_word_t           out_word,
  input  logic                out_full
);
  localparam int unsigned CW = $clog2(N);

  typedef enum logic [1:0] {S_IDLE, S_HEADER, S_CHAN, S_TRAILER} state_e;

  typedef struct packed {
    state_e            state;
    logic [CW-1:0]     ch;
    logic [EVID_W-1:0] hits;
    logic              start;
  } ctl_t;

  ctl_t      ctl_q [3], c_d [3];
  trig_rec_t trig;

  // Three copies of the next-state logic, copy i fed by voter i; the
  // outputs are taken from copy 0.
  for (genvar i = 0; i < 3; i++) begin : g_logic
    logic      o_trig_rd;
    logic [N-1:0] o_ch_rd;
    logic      o_out_v;
    rdo_word_t o_out_word;

    always_comb begin
      c_d[i]       = ctl_q[i];
      c_d[i].start = 1'b0;
      o_trig_rd     = 1'b0;
      o_ch_rd       = '0;
      o_out_v       = 1'b0;
      o_out_word    = '0;
      case (ctl_q[i].state)
        S_IDLE: begin
          if (enable && !trig_empty) begin
            o_trig_rd     = 1'b1;
            c_d[i].start = 1'b1;
            c_d[i].state = S_HEADER;
            c_d[i].ch    = '0;
            c_d[i].hits  = '0;
          end
        end
        S_HEADER: begin
          o_out_word = '{three_bytes: 1'b0,
                       data: {ID_HEADER, trig.coarse, trig.event_id}};
          if (!out_full) begin
            o_out_v       = 1'b1;
            c_d[i].state = S_CHAN;
          end
        end
        S_CHAN: begin
          o_out_word = ch_data[ctl_q[i].ch];
          if (!ch_empty[ctl_q[i].ch]) begin
            if (!out_full) begin
              o_out_v            = 1'b1;
              o_ch_rd[ctl_q[i].ch]    = 1'b1;
              c_d[i].hits       = ctl_q[i].hits + 1'b1;
            end
          end else if (!match_busy[ctl_q[i].ch]) begin
            if (int'(ctl_q[i].ch) == N - 1) c_d[i].state = S_TRAILER;
            else                       c_d[i].ch    = ctl_q[i].ch + 1'b1;
          end
        end
        S_TRAILER: begin
          o_out_word = '{three_bytes: 1'b0,
                       data: {ID_TRAILER, 3'b000, trig.event_id, ctl_q[i].hits}};
          if (!out_full) begin
            o_out_v       = 1'b1;
            c_d[i].state = S_IDLE;
          end
        end
        default: c_d[i].state = S_IDLE;
      endcase
    end
  end

  assign trig_rd  = g_logic[0].o_trig_rd;
  assign ch_rd    = g_logic[0].o_ch_rd;
  assign out_v    = g_logic[0].o_out_v;
  assign out_word = g_logic[0].o_out_word;

  tmr_fsm_reg #(.WIDTH($bits(ctl_t)), .RESET_VAL('0)) u_ctl (
    .clk({3{clk}}), .rst_n, .d(c_d), .q(ctl_q)
  );


  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       trig <= '0;
    else if (trig_rd) trig <= trig_data;
  end

  assign match_start  = ctl_q[0].start;
  assign match_coarse = trig.coarse;
endmodule
