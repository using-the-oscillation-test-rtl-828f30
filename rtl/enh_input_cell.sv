// enh_input_cell: enhanced P1500 wrapper boundary cell on a core input.
//
// Normal P1500 behaviour: in functional mode the signal from the chip
// (cfi_chip) passes straight to the core (cfi_core). The shift stage
// captures cfi_chip on ctrl.capture or takes si on ctrl.shift; the update
// stage copies the shift stage on ctrl.update; with ctrl.mode high the core
// input is driven from the update stage (inward-facing test).
//
// Delay-test extension: a cell_addr_reg gives the cell a unique address
// (CAR) and a select-address register (AD). While ctrl.dc is high the serial
// path runs through AD instead of the shift stage, and ctrl.car_update
// copies AD into CAR. When ctrl.osc_en is high and this cell's address
// matches, a multiplexer feeds loop_in (the fed-back core output) into the
// core input, closing the ring oscillator through the core.
//
// The capture/shift/update structure is the usual one for a P1500 cell
// (the standard defines only its behaviour); all stages are clocked on the
// rising edge of WRCK, the single wrapper clock. The loop path
// loop_in -> cfi_core is combinational.
`timescale 1ns/1ps
module enh_input_cell
  import p1500_pkg::*;
#(
  parameter int unsigned AW = 4
) (
  input  logic      wrck,
  input  logic      wrstn,
  input  wbr_ctrl_t ctrl,
  input  logic      si,
  output logic      so,
  input  logic      cfi_chip,   // functional input from the chip
  output logic      cfi_core,   // to the core
  input  logic      loop_in,    // fed-back core output (after the polarity XOR)
  output logic      selected    // address match and delay test active
);

  logic shift_q, update_q;
  logic ad_so, match;
  logic [AW-1:0] car_unused;

  always_ff @(posedge wrck or negedge wrstn) begin
    if (!wrstn) begin
      shift_q  <= 1'b0;
      update_q <= 1'b0;
    end else begin
      if (ctrl.capture)              shift_q <= cfi_chip;
      else if (ctrl.shift && !ctrl.dc) shift_q <= si;
      if (ctrl.update)               update_q <= shift_q;
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

  assign selected = ctrl.osc_en && match;
  assign so       = ctrl.dc ? ad_so : shift_q;

  always_comb begin
    if (selected)       cfi_core = loop_in;
    else if (ctrl.mode) cfi_core = update_q;
    else                cfi_core = cfi_chip;
  end

endmodule
