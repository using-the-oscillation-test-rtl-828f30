// tb_enh_output_cell: self-checking test of the enhanced wrapper output cell.
//
// Checks functional pass-through to the chip, capture of the core output,
// shift, update and outward test mode, the address path with dc, the CAR
// load, and that the cell drives the loop net only when the delay test is
// active and its address is selected. Reference values are kept by the
// testbench.
`timescale 1ns/1ps
module tb_enh_output_cell;
  import p1500_pkg::*;
  localparam int AW = 4;
  logic wrck = 0, wrstn = 0;
  wbr_ctrl_t ctrl;
  logic si = 0, so, cfo_core = 0, cfo_chip, loop_en, loop_drv;
  int checks = 0, failures = 0;

  enh_output_cell #(.AW(AW)) dut (.*);

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
    repeat (10) begin
      cfo_core = 1'($urandom); #1;
      check(cfo_chip == cfo_core, "functional pass-through");
      check(!loop_en && !loop_drv, "loop idle in functional mode");
    end
    repeat (50) begin
      @(negedge wrck);
      ctrl = '0;
      cfo_core = 1'($urandom); si = 1'($urandom);
      case ($urandom_range(0, 2))
        0: ctrl.capture = 1;
        1: ctrl.shift = 1;
        2: ctrl.update = 1;
      endcase
      ctrl.mode = 1'($urandom);
      #1;
      check(so == exp_shift, "so shows shift stage");
      check(cfo_chip == (ctrl.mode ? exp_upd : cfo_core), "test mode output");
      tick;
      if (ctrl.update) exp_upd = exp_shift;
      if (ctrl.capture) exp_shift = cfo_core;
      else if (ctrl.shift) exp_shift = si;
      check(so == exp_shift, "shift stage after edge");
    end
    @(negedge wrck); ctrl = '0; ctrl.dc = 1; ctrl.shift = 1;
    for (int b = 0; b < AW; b++) begin
      si = 1'(b == 1 || b == 3);           // address 4'b1010
      tick; ad = {si, ad[AW-1:1]};
      @(negedge wrck);
    end
    check(so == ad[0], "so shows AD with dc");
    check(dut.shift_q == exp_shift, "data stage untouched by address shift");
    ctrl.shift = 0; ctrl.car_update = 1; tick; car = ad;
    @(negedge wrck); ctrl.car_update = 0;
    check(dut.u_addr.car_q == 4'b1010, "CAR loaded");
    repeat (30) begin
      sel = ($urandom_range(0, 1) == 1) ? car : AW'($urandom);
      @(negedge wrck); ctrl = '0; ctrl.dc = 1; ctrl.shift = 1;
      for (int b = 0; b < AW; b++) begin
        si = sel[b]; tick; ad = {si, ad[AW-1:1]}; @(negedge wrck);
      end
      ctrl.shift = 0; ctrl.dc = 0; ctrl.osc_en = 1;
      repeat (4) begin
        cfo_core = 1'($urandom); #1;
        check(loop_en == (sel == car), "drives loop iff address matches");
        check(loop_drv == ((sel == car) && cfo_core), "loop value");
        check(cfo_chip == cfo_core, "chip side stays functional");
      end
      ctrl.osc_en = 0; #1;
      check(!loop_en && !loop_drv, "no loop without delay test");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
