// tmr_fsm_reg: state register of a triplicated state machine, in which
// each of the three copies has its own next-state logic.
//
// Copy i is loaded from d[i], the output of copy i of the next-state logic,
// and voter i gives q[i], the majority of the three copies, which feeds
// copy i of that logic back. A single upset in one register copy is
// outvoted at all three voters and overwritten at the copy's next clock
// edge; a transient in one copy of the next-state logic or in one voter
// reaches only one register copy and is corrected in the same way. The
// user of the cell writes its next-state logic inside a three-way generate
// loop and takes its outputs from q[0].
//
// Interface: clk[2:0] are the three (normally identical) clocks, rst_n an
// asynchronous active-low reset to RESET_VAL. Timing: q[i] follows d one
// clock edge later. The structure (three registers, three voters, three
// copies of the combinational logic, each voter feeding one copy) follows
// the chip's flow-control TMR cell; the reset is this design's own.
module tmr_fsm_reg #(
  parameter int unsigned      WIDTH     = 1,
  parameter logic [WIDTH-1:0] RESET_VAL = '0
) (
  input  logic [2:0]       clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d [3],
  output logic [WIDTH-1:0] q [3]
);
  logic [WIDTH-1:0] copy_q [3];

  for (genvar i = 0; i < 3; i++) begin : g_copy
    logic [WIDTH-1:0] r;
    always_ff @(posedge clk[i] or negedge rst_n) begin
      if (!rst_n) r <= RESET_VAL;
      else        r <= d[i];
    end
    assign copy_q[i] = r;

    tmr_voter #(.WIDTH(WIDTH)) u_voter (
      .a(copy_q[0]), .b(copy_q[1]), .c(copy_q[2]), .y(q[i])
    );
  end
endmodule
