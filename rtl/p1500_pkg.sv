// p1500_pkg: shared types and constants of the delay-test enhanced P1500 wrapper.
//
// The instruction register (WIR) is IR_W bits wide. The wrapper knows the
// P1500 instructions WS_BYPASS, WS_EXTEST and WS_INTEST, the two address
// loading instructions LOADIN_UNIQ and LOADOUT_UNIQ that the delay-test
// extension defines, plus DELAY_TEST (run the oscillation test) and
// COUNT_READ (shift the oscillation count out of the bypass register).
// The opcode values, the register width and the last two instruction names
// are choices of this design; the extension names only the two LOAD*_UNIQ
// instructions. Any opcode not listed behaves as WS_BYPASS.
//
// wbr_ctrl_t is the control bundle that the wrapper distributes to each
// boundary cell every WRCK cycle.
`timescale 1ns/1ps
package p1500_pkg;

  localparam int unsigned IR_W = 3;

  typedef enum logic [IR_W-1:0] {
    WS_BYPASS    = 3'd0,
    WS_EXTEST    = 3'd1,
    WS_INTEST    = 3'd2,
    LOADIN_UNIQ  = 3'd3,
    LOADOUT_UNIQ = 3'd4,
    DELAY_TEST   = 3'd5,
    COUNT_READ   = 3'd6
  } instr_e;

  // Per-cell controls, all sampled on the rising edge of WRCK.
  typedef struct packed {
    logic shift;      // ShiftWR applied to this chain
    logic capture;    // CaptureWR applied to this chain
    logic update;     // UpdateWR applied to this chain
    logic mode;       // drive the cell output from its update stage (test mode)
    logic dc;         // shift the address register (AD) instead of the data stage
    logic car_update; // copy AD into the cell address register (CAR)
    logic osc_en;     // delay test active: a matching cell joins the loop
  } wbr_ctrl_t;

endpackage
