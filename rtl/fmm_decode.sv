// fmm_decode: decodes the 4-bit Fast Merging Module (FMM) state sent by the
// DDU into front-panel LED controls and merges it with status requests.
// FMM code (bit3..bit0): 1000 Ready, 0001 Warning/near full, 0010 lost sync,
// 0100 Busy, 1100 Error. LED behaviour: Ready = green on; Warning = green on,
// yellow blinks; lost sync = both blink; Busy = yellow on; Error = yellow
// blinks. The set* outputs OR each state bit with the matching status request
// and set_rdy is high only when none of them (and no VME-not-ready) is set.
// Every gate follows the FMM decode schematic. Purely combinational.
module fmm_decode (
  input  logic [3:0] rl_fmm,
  input  logic       fmm_warn,
  input  logic       fmm_sync,
  input  logic       fmm_busy,
  input  logic       vme_not_ready,
  output logic       set_warn,
  output logic       set_sync,
  output logic       set_busy,
  output logic       set_rdy,
  output logic       ok2fmm,      // green LED on
  output logic       grn_flash,   // green LED blink request (RL_FMM1)
  output logic       busy2fmm,    // yellow LED on
  output logic       blink_yel    // yellow LED blink request
);
  logic err2fmm;
  always_comb begin
    set_warn  = rl_fmm[0] | fmm_warn;
    set_sync  = rl_fmm[1] | fmm_sync;
    set_busy  = rl_fmm[2] | fmm_busy;
    set_rdy   = ~(vme_not_ready | set_warn | set_sync | set_busy);
    busy2fmm  = rl_fmm[2] & ~rl_fmm[3];
    ok2fmm    = rl_fmm[0] | (rl_fmm[3] & ~rl_fmm[2]);
    err2fmm   = rl_fmm[1] | (rl_fmm[3] & rl_fmm[2]);
    blink_yel = err2fmm | rl_fmm[0];
    grn_flash = rl_fmm[1];
  end
endmodule
