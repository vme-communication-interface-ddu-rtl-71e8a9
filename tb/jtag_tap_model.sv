// jtag_tap_model: behavioural IEEE 1149.1 TAP used by the testbenches.
// 16-state TAP controller, an IRLEN-bit instruction register (captures
// ...01) and one 16-bit data register that captures CAPTURE in Capture-DR.
// Shifting moves TDI into the MSB and the LSB out on tdo, so data enter and
// leave LSB first. Update-IR/Update-DR copy the shift registers into ir and
// dr. Counters record Test-Logic-Reset entries and completed updates.
module jtag_tap_model #(
  parameter int unsigned IRLEN   = 8,
  parameter logic [15:0] CAPTURE = 16'hA5C3
) (
  input  logic tck,
  input  logic tms,
  input  logic tdi,
  output logic tdo
);
  typedef enum logic [3:0] {
    TLR, RTI, SEL_DR, CAP_DR, SH_DR, EX1_DR, PA_DR, EX2_DR, UPD_DR,
    SEL_IR, CAP_IR, SH_IR, EX1_IR, PA_IR, EX2_IR, UPD_IR
  } tap_e;
  tap_e st = TLR;
  logic [IRLEN-1:0] irsr = '0, ir = '0;
  logic [15:0]      drsr = '0, dr = '0;
  int unsigned n_upd_ir = 0, n_upd_dr = 0, n_tlr = 0;

  always @(posedge tck) begin
    case (st)
      SH_DR: drsr <= {tdi, drsr[15:1]};
      SH_IR: irsr <= {tdi, irsr[IRLEN-1:1]};
      CAP_DR: drsr <= CAPTURE;
      CAP_IR: irsr <= IRLEN'(1);
      UPD_DR: begin dr <= drsr; n_upd_dr <= n_upd_dr + 1; end
      UPD_IR: begin ir <= irsr; n_upd_ir <= n_upd_ir + 1; end
      default: ;
    endcase
    case (st)
      TLR:    st <= tms ? TLR    : RTI;
      RTI:    st <= tms ? SEL_DR : RTI;
      SEL_DR: st <= tms ? SEL_IR : CAP_DR;
      CAP_DR: st <= tms ? EX1_DR : SH_DR;
      SH_DR:  st <= tms ? EX1_DR : SH_DR;
      EX1_DR: st <= tms ? UPD_DR : PA_DR;
      PA_DR:  st <= tms ? EX2_DR : PA_DR;
      EX2_DR: st <= tms ? UPD_DR : SH_DR;
      UPD_DR: st <= tms ? SEL_DR : RTI;
      SEL_IR: st <= tms ? TLR    : CAP_IR;
      CAP_IR: st <= tms ? EX1_IR : SH_IR;
      SH_IR:  st <= tms ? EX1_IR : SH_IR;
      EX1_IR: st <= tms ? UPD_IR : PA_IR;
      PA_IR:  st <= tms ? EX2_IR : PA_IR;
      EX2_IR: st <= tms ? UPD_IR : SH_IR;
      UPD_IR: st <= tms ? SEL_DR : RTI;
      default: st <= TLR;
    endcase
    if (st == SEL_IR && tms) n_tlr <= n_tlr + 1;
  end

  assign tdo = (st == SH_IR) ? irsr[0] : drsr[0];

  // state flags for testbench checks
  logic in_tlr, in_rti, in_shdr, in_shir;
  assign in_tlr  = st == TLR;
  assign in_rti  = st == RTI;
  assign in_shdr = st == SH_DR;
  assign in_shir = st == SH_IR;
endmodule
