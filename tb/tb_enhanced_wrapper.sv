// tb_enhanced_wrapper: end-to-end test of the delay-test enhanced wrapper at
// its default size (8 input cells, 8 output cells), around a behavioural
// core model with a 7.17 ns critical path.
//
// Sequence: functional mode; one-bit bypass; WIR load; EXTEST and INTEST
// through the boundary register; LOADIN_UNIQ and LOADOUT_UNIQ (the latter
// over the dc1 short path) to give every cell a unique address; then
// DELAY_TEST runs: sensitising vector, select addresses, WBY clear, a
// counting window of WINDOW ns with dc0/dc2, COUNT_READ to shift the count
// out. The critical path (input 7 -> output 7, off-path input 0 held at 1)
// is measured without and with a 0.4 ns injected delay fault, and a short
// path (input 3 -> output 2) and the path from input cell 2 to output cell 1
// (1-based numbering) are measured too. Counts are checked against
// WINDOW / (2 * path delay); the ring period is twice the path delay since
// the wrapper adds no delay. Each mechanism is counted and must occur.
`timescale 1ns/1ps
module tb_enhanced_wrapper;
  import p1500_pkg::*;
  localparam int N_IN = 8, N_OUT = 8, AW = 4, CW = 8;
  localparam int L_WBR = N_IN + N_OUT;
  localparam real WINDOW = 1000.0;

  logic wrck = 0, wrstn = 0, select_wir = 0, capture_wr = 0, shift_wr = 0, update_wr = 0;
  logic wsi = 0, wso, dc = 0, dc0 = 0, dc1 = 0, dc2 = 0;
  logic [N_IN-1:0]  cfi_chip = '0, cfi_core;
  logic [N_OUT-1:0] cfo_core, cfo_chip;
  instr_e instr;
  logic osc_loop;
  logic [CW-1:0] osc_count;
  logic fault_on = 0;
  int checks = 0, failures = 0;

  typedef enum int {M_FUNC, M_BYPASS, M_WIR, M_EXTEST, M_INTEST, M_LOADIN, M_LOADOUT_DC1,
                    M_SELECT, M_OSC, M_GATED, M_COUNT_READ, M_FAULT_DETECT, M_NUM} mech_e;
  int mech [M_NUM];

  enhanced_wrapper dut (.*);

  mcu_path_model #(.N(N_IN), .CRIT(7), .T_CRIT(7.17), .T_FAULT(0.4), .T_SHORT(2.0))
    u_core (.cfi(cfi_core), .fault_on(fault_on), .cfo(cfo_core));

  // internal address registers, for checking the address loads
  logic [AW-1:0] in_car [N_IN], in_ad [N_IN], out_car [N_OUT];
  for (genvar c = 0; c < N_IN; c++) begin : g_peek_in
    assign in_car[c] = dut.g_in[c].u_cell.u_addr.car_q;
    assign in_ad[c]  = dut.g_in[c].u_cell.u_addr.ad_q;
  end
  for (genvar c = 0; c < N_OUT; c++) begin : g_peek_out
    assign out_car[c] = dut.g_out[c].u_cell.u_addr.car_q;
  end

  // edge monitor on the core input of the selected input cell
  int mon_idx = 0, mon_any = 0, mon_rise = 0;
  bit mon_en = 0;
  logic mon_sig;
  assign mon_sig = cfi_core[mon_idx];
  always @(mon_sig) if (mon_en) mon_any++;
  always @(posedge mon_sig) if (mon_en) mon_rise++;

  always #50 wrck = ~wrck;   // 10 MHz test clock

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic logic [N_OUT-1:0] core_f(input logic [N_IN-1:0] x);
    for (int j = 0; j < N_OUT; j++) core_f[j] = x[j] & x[(j + 1) % N_IN];
  endfunction

  // ---- WIP sequences (inputs change on the falling edge of WRCK) ----
  task automatic load_wir(input instr_e op);
    logic [IR_W-1:0] seen;
    @(negedge wrck); select_wir = 1; capture_wr = 1;
    @(negedge wrck); capture_wr = 0; shift_wr = 1;
    for (int b = 0; b < IR_W; b++) begin
      wsi = op[b]; #1; seen[b] = wso;
      @(negedge wrck);
    end
    shift_wr = 0; update_wr = 1;
    @(negedge wrck); update_wr = 0; select_wir = 0;
    #1;
    check(seen == 3'b001, "WIR capture pattern on WSO");
    check(instr == op, "instruction active after update");
    mech[M_WIR]++;
  endtask

  // Shifts n bits (din[k] in at step k) and returns what WSO showed
  // before each step (dout[k]). Optional capture before, update after.
  task automatic shift_dr(input int n, input logic [127:0] din, input bit cap, input bit upd,
                          output logic [127:0] dout);
    dout = '0;
    @(negedge wrck);
    if (cap) begin capture_wr = 1; @(negedge wrck); capture_wr = 0; end
    shift_wr = 1;
    for (int k = 0; k < n; k++) begin
      wsi = din[k]; #1; dout[k] = wso;
      @(negedge wrck);
    end
    shift_wr = 0;
    if (upd) begin update_wr = 1; @(negedge wrck); update_wr = 0; end
  endtask

  // Stream that leaves content[p] in chain position p (p = 0 next to WSI).
  function automatic logic [127:0] stream_for(input int n, input logic [127:0] content);
    for (int k = 0; k < n; k++) stream_for[k] = content[n - 1 - k];
  endfunction

  function automatic logic [127:0] wbr_content(input logic [N_IN-1:0] in_v, input logic [N_OUT-1:0] out_v);
    wbr_content = '0;
    for (int i = 0; i < N_IN; i++)  wbr_content[i] = in_v[i];
    for (int j = 0; j < N_OUT; j++) wbr_content[N_IN + j] = out_v[j];
  endfunction

  // Address chain content: cell c's address bit b at c*AW + (AW-1-b).
  function automatic logic [127:0] addr_content(input int ncells, input logic [AW-1:0] addr [],
                                                input int base);
    addr_content = '0;
    for (int c = 0; c < ncells; c++)
      for (int b = 0; b < AW; b++) addr_content[base + c*AW + (AW-1-b)] = addr[c][b];
  endfunction

  // Delay test of the path from input cell isel to output cell osel.
  // off: vector held on the other core inputs. Returns the count.
  task automatic delay_test(input int isel, input int osel, input logic [N_IN-1:0] vec,
                            output int count);
    logic [127:0] dout, cont;
    logic [AW-1:0] a_in [], a_out [];
    int edges;
    load_wir(DELAY_TEST);
    // sensitising vector into the input cells' update stages
    shift_dr(L_WBR, stream_for(L_WBR, wbr_content(vec, '0)), 1'b1, 1'b1, dout);
    check(osc_count == 0, "WBY cleared by CaptureWR in DELAY_TEST");
    // select address: whole chain (input cells), then output cells over dc1
    a_in = new[N_IN]; a_out = new[N_OUT];
    foreach (a_in[c])  a_in[c]  = AW'(isel);
    foreach (a_out[c]) a_out[c] = AW'(15);
    dc = 1;
    cont = addr_content(N_IN, a_in, 0) | addr_content(N_OUT, a_out, N_IN*AW);
    shift_dr((N_IN + N_OUT) * AW, stream_for((N_IN + N_OUT) * AW, cont), 1'b0, 1'b0, dout);
    foreach (a_out[c]) a_out[c] = AW'(osel);
    dc1 = 1;
    shift_dr(N_OUT * AW, stream_for(N_OUT * AW, addr_content(N_OUT, a_out, 0)), 1'b0, 1'b0, dout);
    dc1 = 0; dc = 0;
    #1;
    check(dut.in_sel == N_IN'(1) << isel, "exactly the chosen input cell selected");
    check(dut.out_en == N_OUT'(1) << osel, "exactly the chosen output cell drives the loop");
    mech[M_SELECT]++;
    for (int i = 0; i < N_IN; i++)
      if (i != isel) check(cfi_core[i] == vec[i], "sensitising vector on core inputs");
    // dc0 high, dc2 low: WBY clocked from the loop, but the window is shut
    mon_idx = isel;
    @(negedge wrck); dc0 = 1;
    #300;
    check(osc_count == 0, "no count while dc2 is low");
    if (osc_count == 0) mech[M_GATED]++;
    // counting window: dc2 high makes the loop inverting and enables counting
    dc2 = 1;
    mon_rise = 0; mon_en = 1;
    #(WINDOW);
    mon_en = 0; edges = mon_rise;
    dc0 = 0; #1;
    dc2 = 0;
    check(edges > 10, "ring oscillates through the core");
    if (edges > 10) mech[M_OSC]++;
    // read the count out
    load_wir(COUNT_READ);
    shift_dr(CW, '0, 1'b0, 1'b0, dout);
    count = int'(dout[CW-1:0]);
    check(osc_count == 0, "count shifted out");
    mech[M_COUNT_READ]++;
  endtask

  initial begin
    repeat (3000) @(posedge wrck);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] dout, cont;
    logic [N_IN-1:0] vin;
    logic [N_OUT-1:0] vout;
    logic [AW-1:0] a_in [], a_out [];
    logic [CW-1:0] bits;
    int c_nom, c_fault, c_short;
    real e;

    #120 wrstn = 1;
    check(instr == WS_BYPASS, "reset instruction");

    // functional mode
    repeat (8) begin
      @(negedge wrck); cfi_chip = N_IN'($urandom); #20;
      check(cfi_core == cfi_chip, "functional input pass-through");
      check(cfo_chip == core_f(cfi_chip), "functional output pass-through");
      mech[M_FUNC]++;
    end

    // bypass: one bit from WSI to WSO
    shift_dr(20, 128'($urandom), 1'b0, 1'b0, dout);
    bits = '0;
    @(negedge wrck); shift_wr = 1;
    for (int k = 0; k < 20; k++) begin
      wsi = 1'($urandom); @(posedge wrck); #1;
      check(wso == wsi, "one-bit bypass");
      mech[M_BYPASS]++;
      @(negedge wrck);
    end
    shift_wr = 0;

    // EXTEST: output cells drive the chip, input cells capture the chip
    load_wir(WS_EXTEST);
    vout = N_OUT'($urandom);
    shift_dr(L_WBR, stream_for(L_WBR, wbr_content('0, vout)), 1'b0, 1'b1, dout);
    check(cfo_chip == vout, "EXTEST drives chip from output cells");
    @(negedge wrck); cfi_chip = N_IN'($urandom); #20;
    shift_dr(L_WBR, '0, 1'b1, 1'b0, dout);
    for (int k = 0; k < L_WBR; k++) cont[L_WBR - 1 - k] = dout[k];
    check(cont[N_IN-1:0] == cfi_chip, "EXTEST captures chip inputs");
    check(cont[L_WBR-1:N_IN] == core_f(cfi_chip), "EXTEST captures core outputs");
    mech[M_EXTEST]++;

    // INTEST: input cells drive the core, output cells capture it
    load_wir(WS_INTEST);
    repeat (4) begin
      vin = N_IN'($urandom);
      shift_dr(L_WBR, stream_for(L_WBR, wbr_content(vin, '0)), 1'b0, 1'b1, dout);
      #20;
      check(cfi_core == vin, "INTEST drives core from input cells");
      shift_dr(L_WBR, '0, 1'b1, 1'b0, dout);
      for (int k = 0; k < L_WBR; k++) cont[L_WBR - 1 - k] = dout[k];
      check(cont[L_WBR-1:N_IN] == core_f(vin), "INTEST captures core response");
      mech[M_INTEST]++;
    end

    // unique addresses: input cells i -> i, output cells j -> j (through full chain)
    a_in = new[N_IN]; a_out = new[N_OUT];
    foreach (a_in[c])  a_in[c]  = AW'(c);
    foreach (a_out[c]) a_out[c] = AW'(15);
    load_wir(LOADIN_UNIQ);
    dc = 1;
    cont = addr_content(N_IN, a_in, 0) | addr_content(N_OUT, a_out, N_IN*AW);
    shift_dr((N_IN + N_OUT) * AW, stream_for((N_IN + N_OUT) * AW, cont), 1'b0, 1'b1, dout);
    dc = 0;
    @(negedge wrck); cfi_chip = N_IN'($urandom); #20;
    check(cfi_core == cfi_chip, "functional mode while loading addresses");
    for (int c = 0; c < N_IN; c++) check(in_car[c] == AW'(c), "input CAR loaded");
    for (int c = 0; c < N_OUT; c++) check(out_car[c] == '1, "output CAR untouched by LOADIN_UNIQ");
    mech[M_LOADIN]++;

    load_wir(LOADOUT_UNIQ);
    foreach (a_out[c]) a_out[c] = AW'(c);
    dc = 1; dc1 = 1;
    shift_dr(N_OUT * AW, stream_for(N_OUT * AW, addr_content(N_OUT, a_out, 0)), 1'b0, 1'b1, dout);
    dc = 0; dc1 = 0;
    for (int c = 0; c < N_OUT; c++) check(out_car[c] == AW'(c), "output CAR loaded over dc1");
    for (int c = 0; c < N_IN; c++) check(in_car[c] == AW'(c), "input CAR kept");
    for (int c = 0; c < N_IN; c++) check(in_ad[c] == AW'(c), "input AD held while dc1 high");
    mech[M_LOADOUT_DC1]++;

    // delay tests
    vin = '1;                       // off-path input 0 at 1 sensitises in7 -> out7
    fault_on = 0;
    delay_test(7, 7, vin, c_nom);
    e = WINDOW / (2.0 * 7.17);
    $display("critical path, nominal: count %0d (window/period %f)", c_nom, e);
    check(real'(c_nom) > e - 1.5 && real'(c_nom) < e + 1.5, "nominal count");

    fault_on = 1;
    delay_test(7, 7, vin, c_fault);
    e = WINDOW / (2.0 * 7.57);
    $display("critical path, +0.4 ns fault: count %0d (window/period %f)", c_fault, e);
    check(real'(c_fault) > e - 1.5 && real'(c_fault) < e + 1.5, "faulty count");
    check(c_fault < c_nom, "delay fault lowers the count");
    if (c_fault < c_nom) mech[M_FAULT_DETECT]++;
    fault_on = 0;

    vin = 8'b0000_0100;             // input 2 at 1 sensitises in3 -> out2
    delay_test(3, 2, vin, c_short);
    e = WINDOW / (2.0 * 2.0);
    $display("short path: count %0d (window/period %f)", c_short, e);
    check(real'(c_short) > e - 1.5 && real'(c_short) < e + 1.5, "short path count");

    // the selection used as an example for the wrapper: input cell 2 and
    // output cell 1 (indices 1 and 0), path in1 -> out0 with in0 held at 1
    vin = 8'b0000_0001;
    delay_test(1, 0, vin, c_short);
    $display("input cell 2 -> output cell 1: count %0d (window/period %f)", c_short, e);
    check(real'(c_short) > e - 1.5 && real'(c_short) < e + 1.5, "cell 2 -> cell 1 path count");

    // back to functional
    load_wir(WS_BYPASS);
    @(negedge wrck); cfi_chip = N_IN'($urandom); #20;
    check(cfi_core == cfi_chip && cfo_chip == core_f(cfi_chip), "functional after test");

    for (int m = 0; m < M_NUM; m++) begin
      $display("mechanism %s: %0d", mech_e'(m), mech[m]);
      check(mech[m] > 0, "mechanism exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
