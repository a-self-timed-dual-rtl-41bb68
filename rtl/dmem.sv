// dmem: single-rail data memory, 16 banks of 256 bytes (12-bit physical
// address).
//
// Asynchronous read port for OF; the write port stores wdata at waddr on the
// rising edge of the write strobe generated by the write adapter in WB.
// Size and banking follow the thesis; the asynchronous read and the strobe
// write are this design's choices (the core has no clock). In the core the
// read path lies on the OF handshake ring, which is why tools report a loop
// through it.
`timescale 1ps/1ps
module dmem #(
  parameter int unsigned AW = 12,
  parameter int unsigned DW = 8
) (
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge we) begin
    mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];
endmodule
