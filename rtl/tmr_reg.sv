// tmr_reg: triplicated register with majority voting and data scrubbing.
//
// Three copies of the register, each on its own clock, feed three voters.
// Every copy loads either the new value d (when en is high) or the value
// its own voter produces (when en is low), so a copy upset by a single-event
// upset, a missing clock edge or a clock glitch is rewritten with the
// majority value at its next clock edge. The output q is the first voter's
// output. Used for the configuration registers, which are loaded from
// outside (JTAG) and otherwise hold their value; state machines and FIFO
// pointers, whose next value is computed from their own, use tmr_fsm_reg.
//
// Interface: clk[2:0] are the three (normally identical) clocks, rst_n an
// asynchronous active-low reset to RESET_VAL. Timing: q follows d one clock
// edge after en. The structure (three registers, three voters, scrubbing
// multiplexers) follows the chip's TMR cell; the reset is this design's own.
module tmr_reg #(
  parameter int unsigned        WIDTH     = 1,
  parameter logic [WIDTH-1:0]   RESET_VAL = '0
) (
  input  logic [2:0]       clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] copy_q [3];
  logic [WIDTH-1:0] voted  [3];

  for (genvar i = 0; i < 3; i++) begin : g_copy
    logic [WIDTH-1:0] r;

    always_ff @(posedge clk[i] or negedge rst_n) begin
      if (!rst_n)  r <= RESET_VAL;
      else if (en) r <= d;
      else         r <= voted[i];
    end

    assign copy_q[i] = r;

    tmr_voter #(.WIDTH(WIDTH)) u_voter (
      .a(copy_q[0]), .b(copy_q[1]), .c(copy_q[2]), .y(voted[i])
    );
  end

  assign q = voted[0];
endmodule
