// wby_counter: wrapper bypass register (WBY) that doubles as the
// oscillation counter (WBV) of the delay test.
//
// As a bypass register (long_mode low) only bit 0 is used: on each WRCK
// rising edge with shift_en it takes si, giving the one-bit WSI-to-WSO
// bypass that P1500 requires. As a counter the register is CW bits wide:
// with osc_sel high (multiplexer 3 selecting the oscillation instead of the
// serial data) the register is clocked by the loop signal osc, and it
// increments on every rising edge of osc while cnt_en is high, so it counts
// the oscillation periods inside the window in which both are high. Back
// under WRCK (osc_sel low), capture_clr clears it before a test and, with
// long_mode high, shift_en shifts the whole count out LSB first.
//
// Counting pulses of the loop signal in a window, the clearing before the
// test and the serial read-out follow the delay-test extension. The width,
// the clock multiplexer, the clear on CaptureWR and the wrap-around on
// overflow are this design's choices. osc_sel must only change while WRCK is
// low and shift_en/capture_clr are low, and the loop must not oscillate
// (cnt_en low) while it changes, so that the clock switch adds no edge that
// changes the register. The count is asynchronous to WRCK: read it only after
// the window has closed.
`timescale 1ns/1ps
module wby_counter #(
  parameter int unsigned CW = 8
) (
  input  logic          wrck,
  input  logic          wrstn,
  input  logic          osc,         // oscillation signal from the loop
  input  logic          osc_sel,     // multiplexer 3: clock from osc, count mode
  input  logic          cnt_en,      // counting window
  input  logic          si,
  input  logic          shift_en,
  input  logic          long_mode,   // shift all CW bits (count read-out)
  input  logic          capture_clr, // clear before a test
  output logic          so,
  output logic [CW-1:0] count
);

  logic wby_clk;

  assign wby_clk = osc_sel ? osc : wrck;

  always_ff @(posedge wby_clk or negedge wrstn) begin
    if (!wrstn) begin
      count <= '0;
    end else if (osc_sel) begin
      if (cnt_en) count <= count + 1'b1;
    end else if (capture_clr) begin
      count <= '0;
    end else if (shift_en) begin
      if (long_mode) count <= {si, count[CW-1:1]};
      else           count[0] <= si;
    end
  end

  assign so = count[0];

endmodule
