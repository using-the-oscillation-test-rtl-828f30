// tb_wby_counter: self-checking test of the bypass register / oscillation
// counter.
//
// Checks the one-bit bypass delay, the clear, counting of a free-running
// oscillation in a window opened by osc_sel and cnt_en (the count is
// compared with window / period), that no edge is counted with cnt_en low,
// and the serial read-out of the full count, LSB first.
`timescale 1ns/1ps
module tb_wby_counter;
  localparam int CW = 8;
  logic wrck = 0, wrstn = 0, osc = 0, osc_sel = 0, cnt_en = 0;
  logic si = 0, shift_en = 0, long_mode = 0, capture_clr = 0;
  logic so;
  logic [CW-1:0] count;
  realtime half_period = 3.0;
  bit osc_run = 0;
  int checks = 0, failures = 0;

  wby_counter #(.CW(CW)) dut (.*);

  always #50 wrck = ~wrck;
  always begin
    #(half_period);
    if (osc_run) osc = ~osc;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Opens the window for w ns and returns the shifted-out count.
  task automatic measure(input realtime w, input bit enable, output logic [CW-1:0] got);
    @(negedge wrck); capture_clr = 1;
    @(negedge wrck); capture_clr = 0;
    check(count == 0, "cleared");
    osc_sel = 1; #1;
    cnt_en = enable; osc_run = 1;
    #(w);
    osc_sel = 0; #1;
    osc_run = 0; cnt_en = 0;
    @(negedge wrck); long_mode = 1; shift_en = 1;
    for (int b = 0; b < CW; b++) begin
      got[b] = so; si = 0;
      @(negedge wrck);
    end
    shift_en = 0; long_mode = 0;
    check(count == 0, "zeros shifted in behind the count");
  endtask

  initial begin
    repeat (2000) @(posedge wrck);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [CW-1:0] got;
    real expect_n;
    #120 wrstn = 1;
    // one-bit bypass: so follows si one WRCK cycle later
    @(negedge wrck); shift_en = 1;
    for (int k = 0; k < 30; k++) begin
      si = 1'($urandom);
      @(posedge wrck); #1;
      check(so == si, "one-bit bypass");
      @(negedge wrck);
    end
    shift_en = 0;
    // count oscillations of several periods
    for (int i = 0; i < 5; i++) begin
      half_period = (i == 0) ? 3.0 : (i == 1) ? 4.0 : (i == 2) ? 7.17 : (i == 3) ? 7.57 : 10.0;
      measure(500.0, 1'b1, got);
      expect_n = 500.0 / (2.0 * half_period);
      check(real'(got) > expect_n - 1.5 && real'(got) < expect_n + 1.5, "count = window / period");
    end
    measure(500.0, 1'b0, got);
    check(got == 0, "no count with cnt_en low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
