// tb_enh_input_cell: self-checking test of the enhanced wrapper input cell.
//
// Checks functional pass-through, capture of the chip-side value, serial
// shift, update and inward test mode, the switch of the serial path to the
// address register with dc, loading the unique address into CAR, and that
// the loop multiplexer feeds loop_in to the core only when the delay test is
// active and the select address matches. Reference values are kept by the
// testbench.
`timescale 1ns/1ps
module tb_enh_input_cell;
  import p1500_pkg::*;
  localparam int AW = 4;
  logic wrck = 0, wrstn = 0;
  wbr_ctrl_t ctrl;
  logic si = 0, so, cfi_chip = 0, cfi_core, loop_in = 0, selected;
  int checks = 0, failures = 0;

  enh_input_cell #(.AW(AW)) dut (.*);

  always #5 wrck = ~wrck;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic tick;
    @(posedge wrck); #1;
  endtask

  initial begin
    repeat (5000) @(posedge wrck);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_shift, exp_upd;
    logic [AW-1:0] ad, car, sel;
    ctrl = '0;
    #12 wrstn = 1;
    exp_shift = 0; exp_upd = 0; ad = '0; car = '1;
    // functional mode: pass-through
    repeat (10) begin
      cfi_chip = 1'($urandom); loop_in = 1'($urandom); #1;
      check(cfi_core == cfi_chip, "functional pass-through");
    end
    // capture, shift, update, test mode
    repeat (50) begin
      @(negedge wrck);
      ctrl = '0;
      cfi_chip = 1'($urandom); si = 1'($urandom);
      case ($urandom_range(0, 2))
        0: ctrl.capture = 1;
        1: ctrl.shift = 1;
        2: ctrl.update = 1;
      endcase
      ctrl.mode = 1'($urandom);
      #1;
      check(so == exp_shift, "so shows shift stage");
      check(cfi_core == (ctrl.mode ? exp_upd : cfi_chip), "test mode output");
      tick;
      if (ctrl.update) exp_upd = exp_shift;
      if (ctrl.capture) exp_shift = cfi_chip;
      else if (ctrl.shift) exp_shift = si;
      check(so == exp_shift, "shift stage after edge");
    end
    // unique address via the address path (dc)
    @(negedge wrck); ctrl = '0; ctrl.dc = 1; ctrl.shift = 1;
    for (int b = 0; b < AW; b++) begin
      si = 1'(b == 0 || b == 2);           // address 4'b0101 entered LSB first
      tick; ad = {si, ad[AW-1:1]};
      @(negedge wrck);
    end
    check(so == ad[0], "so shows AD with dc");
    check(dut.shift_q == exp_shift, "data stage untouched by address shift");
    ctrl.shift = 0; ctrl.car_update = 1; tick; car = ad;
    @(negedge wrck); ctrl.car_update = 0;
    check(dut.u_addr.car_q == 4'b0101, "CAR loaded");
    // select address: match or not, loop multiplexer
    repeat (30) begin
      sel = ($urandom_range(0, 1) == 1) ? car : AW'($urandom);
      @(negedge wrck); ctrl = '0; ctrl.dc = 1; ctrl.shift = 1;
      for (int b = 0; b < AW; b++) begin
        si = sel[b]; tick; ad = {si, ad[AW-1:1]}; @(negedge wrck);
      end
      ctrl.shift = 0; ctrl.dc = 0;
      ctrl.osc_en = 1; ctrl.mode = 1;
      repeat (4) begin
        loop_in = 1'($urandom); cfi_chip = 1'($urandom); #1;
        check(selected == (sel == car), "selected iff address matches");
        check(cfi_core == ((sel == car) ? loop_in : exp_upd), "loop multiplexer");
      end
      ctrl.osc_en = 0; #1;
      check(!selected, "not selected without delay test");
      check(cfi_core == exp_upd, "no loop without delay test");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
