// cell_addr_reg: address logic shared by the enhanced input and output cells.
//
// Each boundary cell owns an AW-bit address shift register (AD) and an
// AW-bit cell address register (CAR). With shift_en high the AD shifts one
// bit per WRCK rising edge, LSB first out of so, new bits entering at the
// MSB from si; the ADs of all cells of a chain form one serial path.
// car_update copies AD into CAR: this is how each cell is given its unique
// address. Later, when the wanted select address has been shifted into all
// ADs, match goes high in the one cell whose CAR equals its AD.
//
// The AD/CAR split, the AD-to-CAR update and the compare follow the
// delay-test extension; the bit order and the reset values (AD all zeros,
// CAR all ones, so no cell matches after reset unless address all-ones is
// shifted in) are choices of this design. match is combinational.
`timescale 1ns/1ps
module cell_addr_reg #(
  parameter int unsigned AW = 4
) (
  input  logic          wrck,
  input  logic          wrstn,      // asynchronous, active low
  input  logic          si,
  input  logic          shift_en,
  input  logic          car_update,
  output logic          so,
  output logic          match,
  output logic [AW-1:0] car_q       // unique address, for observation
);

  logic [AW-1:0] ad_q;

  always_ff @(posedge wrck or negedge wrstn) begin
    if (!wrstn) begin
      ad_q  <= '0;
      car_q <= '1;
    end else begin
      if (shift_en)   ad_q  <= {si, ad_q[AW-1:1]};
      if (car_update) car_q <= ad_q;
    end
  end

  assign so    = ad_q[0];
  assign match = (ad_q == car_q);

endmodule
