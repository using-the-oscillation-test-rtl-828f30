// tb_wir: self-checking test of the wrapper instruction register.
//
// Checks reset to WS_BYPASS, the capture pattern shifted out on so, serial
// load and update of every opcode (unlisted ones decode as WS_BYPASS), that
// the active instruction holds while a new one is shifted in, and that
// nothing moves while SelectWIR is low.
`timescale 1ns/1ps
module tb_wir;
  import p1500_pkg::*;
  logic wrck = 0, wrstn = 0, select_wir = 0, capture_wr = 0, shift_wr = 0, update_wr = 0;
  logic si = 0, so;
  instr_e instr;
  int checks = 0, failures = 0;

  wir dut (.*);

  always #5 wrck = ~wrck;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (instr=%0d)", what, instr); end
  endtask

  function automatic instr_e expect_of(input logic [IR_W-1:0] op);
    return (op inside {3'd1, 3'd2, 3'd3, 3'd4, 3'd5, 3'd6}) ? instr_e'(op) : WS_BYPASS;
  endfunction

  // Loads op; returns the bits seen on so while shifting.
  task automatic load(input logic [IR_W-1:0] op, input bit sel, output logic [IR_W-1:0] seen);
    @(negedge wrck); select_wir = sel; capture_wr = 1;
    @(negedge wrck); capture_wr = 0; shift_wr = 1;
    for (int b = 0; b < IR_W; b++) begin
      si = op[b]; seen[b] = so;
      @(negedge wrck);
    end
    shift_wr = 0; update_wr = 1;
    @(negedge wrck); update_wr = 0; select_wir = 0;
  endtask

  initial begin
    repeat (5000) @(posedge wrck);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [IR_W-1:0] seen;
    instr_e prev;
    logic [IR_W-1:0] op;
    #12 wrstn = 1;
    check(instr == WS_BYPASS, "reset value");
    for (int r = 0; r < 40; r++) begin
      op = (r < 8) ? IR_W'(r) : IR_W'($urandom);
      prev = instr;
      fork
        load(op, 1'b1, seen);
        begin
          // the old instruction stays active until UpdateWR
          repeat (IR_W + 1) begin @(negedge wrck); #1; check(instr == prev, "holds while shifting"); end
        end
      join
      check(seen == 3'b001, "capture pattern on so");
      check(instr == expect_of(op), "instruction after update");
    end
    prev = instr;
    load(3'd5, 1'b0, seen);
    check(instr == prev, "no load with SelectWIR low");
    wrstn = 0; #1;
    check(instr == WS_BYPASS, "asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
