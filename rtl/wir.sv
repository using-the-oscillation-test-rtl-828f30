// wir: wrapper instruction register with its update register.
//
// With select_wir high the WIR sits between WSI and WSO: capture_wr loads
// the fixed IR_CAPTURE pattern into the shift stage, shift_wr shifts it one
// bit per WRCK rising edge (new bits enter at the MSB, so shows the LSB), and
// update_wr copies the shift stage into the update register, whose value is
// the active instruction. WRSTN low resets the active instruction to
// WS_BYPASS, as P1500 requires. The serial load and the update register
// follow the wrapper description; widths, opcodes, capture value and bit
// order are choices of this design (see p1500_pkg).
`timescale 1ns/1ps
module wir
  import p1500_pkg::*;
(
  input  logic   wrck,
  input  logic   wrstn,
  input  logic   select_wir,
  input  logic   capture_wr,
  input  logic   shift_wr,
  input  logic   update_wr,
  input  logic   si,
  output logic   so,
  output instr_e instr
);

  // Value the shift stage captures on CaptureWR.
  localparam logic [IR_W-1:0] IR_CAPTURE = 3'b001;

  logic [IR_W-1:0] shift_q;
  logic [IR_W-1:0] update_q;

  always_ff @(posedge wrck or negedge wrstn) begin
    if (!wrstn) begin
      shift_q  <= '0;
      update_q <= WS_BYPASS;
    end else if (select_wir) begin
      if (capture_wr)    shift_q <= IR_CAPTURE;
      else if (shift_wr) shift_q <= {si, shift_q[IR_W-1:1]};
      if (update_wr)     update_q <= shift_q;
    end
  end

  assign so = shift_q[0];

  // Unlisted opcodes act as WS_BYPASS.
  always_comb begin
    unique case (update_q)
      WS_EXTEST, WS_INTEST, LOADIN_UNIQ, LOADOUT_UNIQ, DELAY_TEST, COUNT_READ:
        instr = instr_e'(update_q);
      default:
        instr = WS_BYPASS;
    endcase
  end

endmodule
