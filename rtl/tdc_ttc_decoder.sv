// tdc_ttc_decoder: decodes the serial TTC (timing, trigger and control) line.
//
// The line is sampled at 160 MHz and idles low. A command is a start bit
// (1) followed by three command bits, first to last: event count reset,
// bunch count reset, trigger. The bits can be combined (e.g. trigger and
// bunch count reset together); all three set means master reset alone.
// After the last bit the decoder returns to looking for a start bit, so
// commands can follow back to back every four cycles.
//
// Interface: ttc is the line, already in the 160 MHz domain; trigger, bcr,
// ecr and master_reset are one-cycle strobes. Timing: the strobes appear
// one cycle after the last command bit is sampled. The state machine and
// the output strobes are triplicated: three copies of the next-state logic
// and of the register, copy i fed by voter i (tmr_fsm_reg). Which commands
// exist and that the decoder is triplicated follow the chip; the line
// format is this design's own.
module tdc_ttc_decoder (
  input  logic clk,
  input  logic rst_n,
  input  logic ttc,
  output logic trigger,
  output logic bcr,
  output logic ecr,
  output logic master_reset
);
  typedef struct packed {
    logic       busy;       // inside a command
    logic [1:0] cnt;        // command bits received
    logic [2:0] sh;         // command bits
    logic       trigger;
    logic       bcr;
    logic       ecr;
    logic       mr;
  } state_t;

  state_t st_q [3], st_d [3];

  // Three copies of the next-state logic, copy i fed by voter i.
  for (genvar i = 0; i < 3; i++) begin : g_logic
    always_comb begin
      logic [2:0] cmd;
      state_t     st;
      st              = st_q[i];
      st_d[i]         = st;
      st_d[i].trigger = 1'b0;
      st_d[i].bcr     = 1'b0;
      st_d[i].ecr     = 1'b0;
      st_d[i].mr      = 1'b0;
      cmd             = {st.sh[1:0], ttc};
      if (!st.busy) begin
        if (ttc) begin
          st_d[i].busy = 1'b1;
          st_d[i].cnt  = '0;
        end
      end else begin
        st_d[i].sh  = cmd;
        st_d[i].cnt = st.cnt + 1'b1;
        if (st.cnt == 2'd2) begin
          st_d[i].busy = 1'b0;
          if (cmd == 3'b111) begin
            st_d[i].mr = 1'b1;
          end else begin
            st_d[i].ecr     = cmd[2];
            st_d[i].bcr     = cmd[1];
            st_d[i].trigger = cmd[0];
          end
        end
      end
    end
  end

  tmr_fsm_reg #(.WIDTH($bits(state_t))) u_state (
    .clk({3{clk}}), .rst_n, .d(st_d), .q(st_q)
  );

  state_t st;
  assign st = st_q[0];

  assign trigger      = st.trigger;
  assign bcr          = st.bcr;
  assign ecr          = st.ecr;
  assign master_reset = st.mr;
endmodule
