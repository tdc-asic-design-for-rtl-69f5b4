// tdc_serial_interface: two-lane 8b/10b serial output at 320 Mb/s per lane.
//
// Readout words are cut into bytes, most significant first (three bytes for
// an edge-mode word, four otherwise), and the byte stream is spread over the
// two lanes: in every symbol period lane 0 sends the next byte and lane 1
// the one after it. When no byte is ready a lane sends the comma K28.5,
// which the receiver drops, so idle lanes carry commas for alignment. Each
// lane has its own 8b/10b running disparity. A 10-bit symbol lasts five
// 160 MHz cycles, and each lane outputs two bits per cycle (dout[l][1] is
// sent first) for a double-data-rate output driver: 320 Mb/s per lane, and
// 64 Mbyte/s of payload over both lanes.
//
// Interface: show-ahead read side of the readout FIFO (empty, rdata,
// rd_en). Timing: a word popped in a symbol's last cycle starts on the lines
// the next cycle. The symbol timer, byte counter and disparities are
// triplicated together with the logic that updates them (byte fetch and
// encoders, tmr_fsm_reg); the shift registers and the word being sent are
// single copies. The lane count, rate, 8b/10b coding and the K28.5 idle
// follow the chip; the byte order and the lane interleaving are this
// design's own.
module tdc_serial_interface
  import tdc_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            fifo_empty,
  input  rdo_word_t       fifo_data,
  output logic            fifo_rd,
  output logic [1:0][1:0] dout,      // [lane][bit pair]
  output logic            symbol_start  // first cycle of a symbol period
);
  typedef struct packed {
    logic [2:0] timer;   // 0..4, cycle within the symbol period
    logic [2:0] left;    // bytes left in the current word
    logic [1:0] rd;      // running disparity per lane
  } ctl_t;

  ctl_t            ctl_q [3], ctl_d [3];
  logic [31:0]     cur;
  logic [1:0][9:0] sh;

  // Three copies of the control logic (byte fetch, encoders, timer), copy
  // i fed by voter i; the data path takes the FIFO read, the symbols and
  // the next word from copy 0.
  for (genvar i = 0; i < 3; i++) begin : g_logic
    ctl_t            ctl;
    logic            load, fifo_rd_c;
    logic [31:0]     cur_d;
    logic [1:0][7:0] byte_v;
    logic [1:0]      is_k;
    logic [1:0][9:0] code;
    logic [1:0]      rd_next;
    logic [2:0]      left_d;

    assign ctl  = ctl_q[i];
    assign load = (ctl.timer == 3'd4);

    // Byte fetch for both lanes of the next symbol; at most one word is
    // popped per symbol period because a word holds at least three bytes.
    always_comb begin
      logic [31:0] d;
      logic [2:0]  n;
      logic        popped;
      d         = cur;
      popped    = 1'b0;
      n         = ctl.left;
      fifo_rd_c = 1'b0;
      for (int l = 0; l < 2; l++) begin
        if (n == 3'd0 && !popped && !fifo_empty) begin
          popped    = 1'b1;
          fifo_rd_c = load;
          d         = fifo_data.data;
          n         = fifo_data.three_bytes ? 3'd3 : 3'd4;
        end
        if (n != 3'd0) begin
          byte_v[l] = d[31:24];
          is_k[l]   = 1'b0;
          d         = d << 8;
          n         = n - 1'b1;
        end else begin
          byte_v[l] = K28_5;
          is_k[l]   = 1'b1;
        end
      end
      cur_d  = d;
      left_d = n;
    end

    for (genvar l = 0; l < 2; l++) begin : g_lane
      tdc_enc8b10b u_enc (
        .data(byte_v[l]), .k(is_k[l]), .rd_in(ctl.rd[l]),
        .code(code[l]), .rd_out(rd_next[l])
      );
    end

    always_comb begin
      ctl_d[i] = ctl;
      if (load) begin
        ctl_d[i].timer = '0;
        ctl_d[i].left  = left_d;
        ctl_d[i].rd    = rd_next;
      end else begin
        ctl_d[i].timer = ctl.timer + 1'b1;
      end
    end
  end

  // After reset each lane sends K28.5 (negative form) first, which leaves
  // the running disparity positive.
  localparam ctl_t CTL_RESET = '{timer: 3'd0, left: 3'd0, rd: 2'b11};
  tmr_fsm_reg #(.WIDTH($bits(ctl_t)), .RESET_VAL(CTL_RESET)) u_ctl (
    .clk({3{clk}}), .rst_n, .d(ctl_d), .q(ctl_q)
  );

  assign fifo_rd = g_logic[0].fifo_rd_c;
  for (genvar l = 0; l < 2; l++) begin : g_out
    assign dout[l] = sh[l][9:8];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur <= '0;
      sh  <= {2{10'b0011111010}};
    end else begin
      if (g_logic[0].load) cur <= g_logic[0].cur_d;
      for (int l = 0; l < 2; l++)
        sh[l] <= g_logic[0].load ? g_logic[0].code[l] : {sh[l][7:0], 2'b00};
    end
  end

  assign symbol_start = (ctl_q[0].timer == 3'd0);
endmodule
