// hn07_ioport: one 8-bit bidirectional I/O port (the HN-07 has four: a-d).
//
// Holds an output latch (PORTx) and a direction register (TRISx, 1 = input,
// reset to all inputs). Reading PORTx returns the pin levels, writing it sets
// the latch. The pad itself is outside this module: the core drives pin_out
// and pin_oe and reads pin_in, and a tristate pad joins them into the inout
// pin. Addresses are parameters; the defaults are PORTA/TRISA. The register
// pair follows the PIC family; the document only says "four 8-bit
// bidirectional I/O ports".
module hn07_ioport
  import hn07_pkg::*;
#(
  parameter daddr_t PORT_ADDR = A_PORTA,
  parameter daddr_t TRIS_ADDR = A_TRISA
) (
  input  logic       clk,
  input  logic       rst_n,
  input  daddr_t     sfr_raddr,
  output logic [7:0] sfr_rdata,
  input  daddr_t     sfr_waddr,
  input  logic [7:0] sfr_wdata,
  input  logic       sfr_we,
  input  logic [7:0] pin_in,
  output logic [7:0] pin_out,
  output logic [7:0] pin_oe
);
  logic [7:0] lat, tris;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lat  <= '0;
      tris <= '1;
    end else if (sfr_we) begin
      if (sfr_waddr == PORT_ADDR) lat  <= sfr_wdata;
      if (sfr_waddr == TRIS_ADDR) tris <= sfr_wdata;
    end
  end

  assign pin_out = lat;
  assign pin_oe  = ~tris;

  always_comb begin
    if (sfr_raddr == PORT_ADDR)      sfr_rdata = pin_in;
    else if (sfr_raddr == TRIS_ADDR) sfr_rdata = tris;
    else                             sfr_rdata = 8'h00;
  end
endmodule
