// enhanced_wrapper: IEEE P1500 core wrapper extended for delay-fault testing
// with the oscillation test method.
//
// A critical path through the wrapped core is sensitised by loading a test
// vector into the input cells (inward-facing mode). The output cell at the
// path's end and the input cell at its start are selected by address; the
// selected output cell puts the core output on the loop net, XOR 4 inverts it
// or not under dc2, and the selected input cell feeds it back into the core.
// With an odd number of inversions around the ring it oscillates at a
// frequency set by the path delay, and the bypass register, turned into a
// counter (WBV), counts the oscillation periods in a window. A delay fault
// lowers the frequency and so the count, which is shifted out through WSO.
//
// Serial paths (WSI to WSO):
//   select_wir high                  : WIR
//   EXTEST, INTEST, LOADIN_UNIQ,
//   LOADOUT_UNIQ, DELAY_TEST         : input cells 0..N_IN-1, then output
//                                      cells 0..N_OUT-1 (WBR). With dc high
//                                      the chain runs through the cells'
//                                      address registers (AD) instead.
//   WS_BYPASS                        : one bit of the WBY
//   COUNT_READ                       : all CW bits of the WBY (the count)
// dc1 high (demultiplexer 1 / multiplexer 2) sends WSI straight to the output
// cells and holds the input cells, so the output cells can be given a select
// address different from the input cells' without shifting through them.
// UpdateWR under LOADIN_UNIQ / LOADOUT_UNIQ copies AD into CAR in every input
// / output cell; in both the core runs in functional mode.
// DELAY_TEST: input cells drive the core from their update stages except the
// selected one, which feeds the loop; CaptureWR clears the WBY; dc0 switches
// the WBY's clock to the loop signal and dc0 together with dc2 opens the
// counting window.
//
// Control signals: the six WIP signals (WRCK, WRSTN, SelectWIR, CaptureWR,
// ShiftWR, UpdateWR) and the delay-test signals dc, dc0, dc1, dc2. Everything
// is clocked on the rising edge of WRCK, except the WBY while it counts.
// The wrapped core sits outside this module: cfi_core/cfo_core connect to it.
// The dc signals, the cells' address logic, demultiplexer 1, multiplexers 2
// and 3 and XOR 4 follow the extension; the instruction encoding, the
// COUNT_READ instruction, the AND-OR loop net in place of tristate buffers
// and the cell order on the chain are this design's choices.
`timescale 1ns/1ps
module enhanced_wrapper
  import p1500_pkg::*;
#(
  parameter int unsigned N_IN  = 8,   // wrapper input cells
  parameter int unsigned N_OUT = 8,   // wrapper output cells
  parameter int unsigned AW    = 4,   // cell address width
  parameter int unsigned CW    = 8    // oscillation counter width
) (
  // Wrapper Interface Port
  input  logic             wrck,
  input  logic             wrstn,
  input  logic             select_wir,
  input  logic             capture_wr,
  input  logic             shift_wr,
  input  logic             update_wr,
  // serial test data
  input  logic             wsi,
  output logic             wso,
  // delay-test controls
  input  logic             dc,
  input  logic             dc0,
  input  logic             dc1,
  input  logic             dc2,
  // functional terminals
  input  logic [N_IN-1:0]  cfi_chip,
  output logic [N_IN-1:0]  cfi_core,
  input  logic [N_OUT-1:0] cfo_core,
  output logic [N_OUT-1:0] cfo_chip,
  // observation
  output instr_e           instr,
  output logic             osc_loop,   // loop signal after XOR 4
  output logic [CW-1:0]    osc_count
);

  logic wir_so, wby_so, wbr_so;
  logic in_so_last;
  wbr_ctrl_t in_ctrl, out_ctrl;
  logic wbr_sel, cap_en, upd_en, osc_en;
  logic wr_shift, wr_capture, wr_update;
  logic [N_IN:0]    in_chain;
  logic [N_OUT:0]   out_chain;
  logic [N_IN-1:0]  in_sel;
  logic [N_OUT-1:0] out_en, out_drv;
  logic loop_net;

  // ---------------- instruction register ----------------
  wir u_wir (
    .wrck       (wrck),
    .wrstn      (wrstn),
    .select_wir (select_wir),
    .capture_wr (capture_wr),
    .shift_wr   (shift_wr),
    .update_wr  (update_wr),
    .si         (wsi),
    .so         (wir_so),
    .instr      (instr)
  );

  // ---------------- decode of WIP + WIR ----------------
  assign wr_shift   = shift_wr   && !select_wir;
  assign wr_capture = capture_wr && !select_wir;
  assign wr_update  = update_wr  && !select_wir;

  assign wbr_sel = instr inside {WS_EXTEST, WS_INTEST, LOADIN_UNIQ, LOADOUT_UNIQ, DELAY_TEST};
  assign cap_en  = wr_capture && (instr inside {WS_EXTEST, WS_INTEST});
  assign upd_en  = wr_update  && (instr inside {WS_EXTEST, WS_INTEST, DELAY_TEST});
  assign osc_en  = (instr == DELAY_TEST);

  always_comb begin
    in_ctrl.shift      = wr_shift && wbr_sel && !dc1;   // demultiplexer 1
    in_ctrl.capture    = cap_en;
    in_ctrl.update     = upd_en;
    in_ctrl.mode       = instr inside {WS_INTEST, DELAY_TEST};
    in_ctrl.dc         = dc;
    in_ctrl.car_update = wr_update && (instr == LOADIN_UNIQ);
    in_ctrl.osc_en     = osc_en;

    out_ctrl.shift      = wr_shift && wbr_sel;
    out_ctrl.capture    = cap_en;
    out_ctrl.update     = upd_en;
    out_ctrl.mode       = (instr == WS_EXTEST);
    out_ctrl.dc         = dc;
    out_ctrl.car_update = wr_update && (instr == LOADOUT_UNIQ);
    out_ctrl.osc_en     = osc_en;
  end

  // ---------------- boundary register ----------------
  assign in_chain[0] = wsi;
  assign in_so_last  = in_chain[N_IN];

  for (genvar i = 0; i < N_IN; i++) begin : g_in
    enh_input_cell #(.AW(AW)) u_cell (
      .wrck     (wrck),
      .wrstn    (wrstn),
      .ctrl     (in_ctrl),
      .si       (in_chain[i]),
      .so       (in_chain[i+1]),
      .cfi_chip (cfi_chip[i]),
      .cfi_core (cfi_core[i]),
      .loop_in  (osc_loop),
      .selected (in_sel[i])
    );
  end

  assign out_chain[0] = dc1 ? wsi : in_so_last;   // multiplexer 2

  for (genvar j = 0; j < N_OUT; j++) begin : g_out
    enh_output_cell #(.AW(AW)) u_cell (
      .wrck     (wrck),
      .wrstn    (wrstn),
      .ctrl     (out_ctrl),
      .si       (out_chain[j]),
      .so       (out_chain[j+1]),
      .cfo_core (cfo_core[j]),
      .cfo_chip (cfo_chip[j]),
      .loop_en  (out_en[j]),
      .loop_drv (out_drv[j])
    );
  end

  assign wbr_so = out_chain[N_OUT];

  // ---------------- loop net and XOR 4 ----------------
  assign loop_net = |out_drv;
  assign osc_loop = loop_net ^ dc2;

  // Only one output cell may drive the loop net, and only one input cell
  // take it, while the ring runs.
  a_one_driver: assert property (@(posedge wrck) (osc_en && dc2) |-> $onehot0(out_en));
  a_one_taker:  assert property (@(posedge wrck) (osc_en && dc2) |-> $onehot0(in_sel));

  // ---------------- bypass register / oscillation counter ----------------
  wby_counter #(.CW(CW)) u_wby (
    .wrck        (wrck),
    .wrstn       (wrstn),
    .osc         (osc_loop),
    .osc_sel     (dc0 && osc_en),                        // multiplexer 3
    .cnt_en      (dc0 && dc2),
    .si          (wsi),
    .shift_en    (wr_shift && !wbr_sel),
    .long_mode   (instr == COUNT_READ),
    .capture_clr (wr_capture && osc_en),
    .so          (wby_so),
    .count       (osc_count)
  );

  // ---------------- WSO multiplexers ----------------
  always_comb begin
    if (select_wir)   wso = wir_so;
    else if (wbr_sel) wso = wbr_so;
    else              wso = wby_so;
  end

endmodule
