// enh_output_cell: enhanced P1500 wrapper boundary cell on a core output.
//
// Normal P1500 behaviour: in functional mode the core output (cfo_core)
// passes straight to the chip (cfo_chip). The shift stage captures cfo_core
// on ctrl.capture or takes si on ctrl.shift; the update stage copies the
// shift stage on ctrl.update; with ctrl.mode high the chip is driven from
// the update stage (outward-facing test).
//
// Delay-test extension: the same address logic as the input cell. When
// ctrl.osc_en is high and the cell's address matches, the cell drives its
// core output onto the wrapper's loop net. The extension uses a tristate
// buffer for this; here each cell instead presents loop_en and
// loop_drv = loop_en & cfo_core, and the wrapper ORs the loop_drv of all
// output cells. With at most one cell selected this is the same net without
// tristate logic. Clocking as in enh_input_cell; cfo_core -> loop_drv is
// combinational.
`timescale 1ns/1ps
module enh_output_cell
  import p1500_pkg::*;
#(
  parameter int unsigned AW = 4
) (
  input  logic      wrck,
  input  logic      wrstn,
  input  wbr_ctrl_t ctrl,
  input  logic      si,
  output logic      so,
  input  logic      cfo_core,   // functional output of the core
  output logic      cfo_chip,   // to the chip
  output logic      loop_en,    // this cell drives the loop net
  output logic      loop_drv    // its contribution to the loop net
);

  logic shift_q, update_q;
  logic ad_so, match;
  logic [AW-1:0] car_unused;

  always_ff @(posedge wrck or negedge wrstn) begin
    if (!wrstn) begin
      shift_q  <= 1'b0;
      update_q <= 1'b0;
    end else begin
      if (ctrl.capture)                shift_q <= cfo_core;
      else if (ctrl.shift && !ctrl.dc) shift_q <= si;
      if (ctrl.update)                 update_q <= shift_q;
    end
  end

  cell_addr_reg #(.AW(AW)) u_addr (
    .wrck       (wrck),
    .wrstn      (wrstn),
    .si         (si),
    .shift_en   (ctrl.shift && ctrl.dc),
    .car_update (ctrl.car_update),
    .so         (ad_so),
    .match      (match),
    .car_q      (car_unused)
  );

  assign loop_en  = ctrl.osc_en && match;
  assign loop_drv = loop_en && cfo_core;
  assign so       = ctrl.dc ? ad_so : shift_q;
  assign cfo_chip = ctrl.mode ? update_q : cfo_core;

endmodule
