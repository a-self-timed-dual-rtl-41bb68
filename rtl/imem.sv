// imem: single-rail instruction memory, 2^AW words of DW bits.
//
// Asynchronous read: rdata follows addr combinationally (the read adapter's
// matched delay stands for the access time). A synchronous load port, clocked
// by load_clk, fills the memory before the core is released from reset.
// The thesis uses an ordinary single-rail memory behind an adapter; the
// asynchronous read and the load port are this design's choices. In the core
// the read path lies on the IF handshake ring, which is why tools report a
// loop through it.
`timescale 1ps/1ps
module imem #(
  parameter int unsigned AW = 10,
  parameter int unsigned DW = 16
) (
  input  logic [AW-1:0] addr,
  output logic [DW-1:0] rdata,
  input  logic          load_clk,
  input  logic          load_we,
  input  logic [AW-1:0] load_addr,
  input  logic [DW-1:0] load_data
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge load_clk) begin
    if (load_we) mem[load_addr] <= load_data;
  end

  assign rdata = mem[addr];
endmodule
