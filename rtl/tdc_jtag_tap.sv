// tdc_jtag_tap: IEEE 1149.1 test access port for configuration.
//
// The standard 16-state TAP controller, a 4-bit instruction register and
// one shared data shift register. Instructions: IDCODE (4'h1, also selected
// after reset), SETUP (4'h2, the setup register), CONTROL (4'h3), STATUS
// (4'h4, read only) and BYPASS (4'hF and every unused code). Capture-DR
// loads the selected register, Shift-DR shifts it out LSB first with TDI
// entering at its MSB, and Update-DR issues a one-TCK write strobe for
// SETUP or CONTROL with the shifted value. TDO changes on the falling TCK
// edge, as the standard requires.
//
// Interface: tck/tms/tdi/trst_n/tdo pins; the write strobes and data go to
// tdc_config_regs, which also returns the current values for read-back.
// The TAP and the IDCODE/setup register access follow the chip; the
// instruction codes, the IDCODE value and the register lengths are this
// design's own.
module tdc_jtag_tap
  import tdc_pkg::*;
#(
  parameter logic [31:0] IDCODE = 32'h1D7C_0A0F   // bit 0 must be 1
) (
  input  logic                 tck,
  input  logic                 trst_n,
  input  logic                 tms,
  input  logic                 tdi,
  output logic                 tdo,
  input  setup_t               setup_q,
  input  control_t             control_q,
  input  status_t              status,
  output logic                 setup_wr,
  output logic                 control_wr,
  output logic [SETUP_W-1:0]   wr_data
);
  typedef enum logic [3:0] {
    TLR, RTI, SEL_DR, CAP_DR, SH_DR, EX1_DR, PA_DR, EX2_DR, UPD_DR,
    SEL_IR, CAP_IR, SH_IR, EX1_IR, PA_IR, EX2_IR, UPD_IR
  } tap_e;

  localparam logic [3:0] I_IDCODE  = 4'h1;
  localparam logic [3:0] I_SETUP   = 4'h2;
  localparam logic [3:0] I_CONTROL = 4'h3;
  localparam logic [3:0] I_STATUS  = 4'h4;

  localparam int unsigned DRW = (SETUP_W > 32) ? SETUP_W : 32;

  tap_e           st, st_d;
  logic [3:0]     ir, ir_sh;
  logic [DRW-1:0] dr, dr_shifted;
  int unsigned    len;

  always_comb begin
    unique case (st)
      TLR:    st_d = tms ? TLR    : RTI;
      RTI:    st_d = tms ? SEL_DR : RTI;
      SEL_DR: st_d = tms ? SEL_IR : CAP_DR;
      CAP_DR: st_d = tms ? EX1_DR : SH_DR;
      SH_DR:  st_d = tms ? EX1_DR : SH_DR;
      EX1_DR: st_d = tms ? UPD_DR : PA_DR;
      PA_DR:  st_d = tms ? EX2_DR : PA_DR;
      EX2_DR: st_d = tms ? UPD_DR : SH_DR;
      UPD_DR: st_d = tms ? SEL_DR : RTI;
      SEL_IR: st_d = tms ? TLR    : CAP_IR;
      CAP_IR: st_d = tms ? EX1_IR : SH_IR;
      SH_IR:  st_d = tms ? EX1_IR : SH_IR;
      EX1_IR: st_d = tms ? UPD_IR : PA_IR;
      PA_IR:  st_d = tms ? EX2_IR : PA_IR;
      EX2_IR: st_d = tms ? UPD_IR : SH_IR;
      default: st_d = tms ? SEL_DR : RTI;   // UPD_IR
    endcase
  end

  // Length of the selected data register.
  always_comb begin
    unique case (ir)
      I_IDCODE:  len = 32;
      I_SETUP:   len = SETUP_W;
      I_CONTROL: len = CONTROL_W;
      I_STATUS:  len = STATUS_W;
      default:   len = 1;
    endcase
  end

  always_comb begin
    for (int i = 0; i < DRW; i++) begin
      if (i == len - 1)   dr_shifted[i] = tdi;
      else if (i < len - 1) dr_shifted[i] = dr[i + 1];
      else                dr_shifted[i] = 1'b0;
    end
  end

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      st    <= TLR;
      ir    <= I_IDCODE;
      ir_sh <= '0;
      dr    <= '0;
    end else begin
      st <= st_d;
      unique case (st)
        TLR:    ir    <= I_IDCODE;
        CAP_IR: ir_sh <= 4'b0001;
        SH_IR:  ir_sh <= {tdi, ir_sh[3:1]};
        UPD_IR: ir    <= ir_sh;
        CAP_DR: begin
          unique case (ir)
            I_IDCODE:  dr <= DRW'(IDCODE);
            I_SETUP:   dr <= DRW'(setup_q);
            I_CONTROL: dr <= DRW'(control_q);
            I_STATUS:  dr <= DRW'(status);
            default:   dr <= '0;
          endcase
        end
        SH_DR:  dr <= dr_shifted;
        default: ;
      endcase
    end
  end

  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n)        tdo <= 1'b0;
    else if (st == SH_IR) tdo <= ir_sh[0];
    else if (st == SH_DR) tdo <= dr[0];
  end

  assign setup_wr   = (st == UPD_DR) && (ir == I_SETUP);
  assign control_wr = (st == UPD_DR) && (ir == I_CONTROL);
  assign wr_data    = dr[SETUP_W-1:0];
endmodule
