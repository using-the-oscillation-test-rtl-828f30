// tb_cell_addr_reg: self-checking test of the per-cell address logic.
//
// Two cells are chained as in a wrapper. The test checks the reset state
// (no match), shifting unique addresses through both AD registers, the copy
// into CAR, the serial output, and that a select address shifted into both
// ADs makes exactly the cell with that unique address match. Expected values
// come from a shift-register model kept in the testbench.
`timescale 1ns/1ps
module tb_cell_addr_reg;
  localparam int AW = 4;
  logic wrck = 0, wrstn = 0, si = 0, shift_en = 0, car_update = 0;
  logic so0, so1, m0, m1;
  logic [AW-1:0] car0, car1;
  logic [2*AW-1:0] model;   // model[2*AW-1] = entry bit of cell 0
  int checks = 0, failures = 0;

  cell_addr_reg #(.AW(AW)) c0 (.wrck, .wrstn, .si, .shift_en, .car_update,
                               .so(so0), .match(m0), .car_q(car0));
  cell_addr_reg #(.AW(AW)) c1 (.wrck, .wrstn, .si(so0), .shift_en, .car_update,
                               .so(so1), .match(m1), .car_q(car1));

  always #5 wrck = ~wrck;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Shift value v (c0 address in the upper AW bits of the model, c1 in the
  // lower) into the chain; checks so1 against the model on every step.
  task automatic load(input logic [AW-1:0] a0, input logic [AW-1:0] a1);
    logic [2*AW-1:0] target = {a0, a1};
    for (int s = 0; s < 2*AW; s++) begin
      @(negedge wrck);
      check(so1 == model[0], "serial out");
      si = target[s]; shift_en = 1;
      @(posedge wrck);
      model = {si, model[2*AW-1:1]};
      #1;
    end
    @(negedge wrck); shift_en = 0;
  endtask

  initial begin
    repeat (3000) @(posedge wrck);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [AW-1:0] u0, u1, sel;
    model = '0;
    #12 wrstn = 1;
    check(!m0 && !m1, "no match after reset");
    check(car0 == '1 && car1 == '1, "CAR reset value");
    repeat (20) begin
      u0 = AW'($urandom);
      do u1 = AW'($urandom); while (u1 == u0);
      load(u0, u1);
      check(c0.ad_q == model[2*AW-1:AW] && c1.ad_q == model[AW-1:0], "AD contents");
      check(car0 != u0 || car1 != u1 || (m0 && m1), "match tracks AD==CAR");
      @(negedge wrck); car_update = 1;
      @(negedge wrck); car_update = 0;
      check(car0 == u0 && car1 == u1, "CAR updated from AD");
      check(m0 && m1, "own address matches after update");
      for (int k = 0; k < 4; k++) begin
        sel = (k == 0) ? u0 : (k == 1) ? u1 : AW'($urandom);
        load(sel, sel);
        check(m0 == (sel == u0), "cell 0 match");
        check(m1 == (sel == u1), "cell 1 match");
        check(!(m0 && m1), "at most one match");
        check(car0 == u0 && car1 == u1, "CAR holds while shifting AD");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
