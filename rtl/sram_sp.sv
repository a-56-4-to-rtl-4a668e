`timescale 1ps/1fs
// sram_sp: 512 x 16-bit (8 kbit) single-port synchronous SRAM.
//
// Behaviour of one of the on-chip 8-kbit SRAMs that hold the multi-bank
// linearization table: one access per clock, write when we=1, registered
// read data (one cycle latency). The organisation 512 x 16 is this design's
// choice that gives 8 kbit; the document gives only the capacity. Contents
// are undefined until written.
module sram_sp #(
  parameter int AW = 9,
  parameter int DW = 16
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [1<<AW];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      rdata <= mem[addr];
    end
  end
endmodule
