// mcu_path_model: behavioural stand-in for the wrapped core (not
// synthesizable: it uses delays). It models only the combinational paths
// that the delay test sensitises: core output j is the AND of core inputs j
// and (j+1) mod N, so a path from input j+1 to output j is sensitised by
// holding input j at 1, its non-controlling value. Output CRIT has the long
// delay T_CRIT (the critical path), plus T_FAULT when fault_on is high (an
// injected delay fault); all other outputs have delay T_SHORT.
`timescale 1ns/1ps
module mcu_path_model #(
  parameter int  N       = 8,
  parameter int  CRIT    = 7,
  parameter real T_CRIT  = 7.17,
  parameter real T_FAULT = 0.4,
  parameter real T_SHORT = 2.0
) (
  input  logic [N-1:0] cfi,
  input  logic         fault_on,
  output logic [N-1:0] cfo
);
  logic [N-1:0] f, f_short, f_crit, f_slow;

  for (genvar j = 0; j < N; j++) begin : g_f
    assign f[j] = cfi[j] & cfi[(j + 1) % N];
  end

  assign #(T_SHORT)          f_short = f;
  assign #(T_CRIT)           f_crit  = f;
  assign #(T_CRIT + T_FAULT) f_slow  = f;

  always_comb begin
    cfo = f_short;
    cfo[CRIT] = fault_on ? f_slow[CRIT] : f_crit[CRIT];
  end
endmodule
