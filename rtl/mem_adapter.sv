// mem_adapter: read adapter between a dual-rail address bundle and a
// single-rail asynchronous-read memory (IMEMAdp, and the read side of
// DMEMAdp).
//
// The true rails of the address drive the memory directly. A per-bit OR and a
// C-element tree detect that the address is complete; that completion goes
// through a matched delay covering the memory access time and then enables an
// AND gate on each data rail: data.t = en & d, data.f = en & ~d. The enable is
// the AND of the undelayed and the delayed completion, so the data rises one
// access time after the address is complete but falls to NULL as soon as the
// address has returned to NULL, without waiting for the delay; the next
// address therefore cannot show through the old, still-high delayed enable.
// While the address is only partly NULL the memory sees a changed address, so
// the word may change value (every bit stays a legal valid codeword); this is
// harmless because the consumer has latched the word before it lets the
// address return to NULL. Widths default to the instruction
// side (10-bit word address, 16-bit instruction).
// Reset must be held longer than DELAY so that the delay line has settled
// to 0 before the first address arrives.
//
// The adapter's role, completion detection plus matched delay, follows the
// thesis; the AND of undelayed and delayed completion as the enable is this
// design's own refinement.
`timescale 1ps/1ps
module mem_adapter #(
  parameter int unsigned AW    = 10,
  parameter int unsigned DW    = 16,
  parameter int unsigned DELAY = 400
) (
  input  logic          rst,
  input  logic [AW-1:0] addr_t, addr_f,
  output logic [AW-1:0] mem_addr,
  input  logic [DW-1:0] mem_data,
  output logic [DW-1:0] data_t, data_f
);
  logic done, done_d, en;

  assign mem_addr = addr_t;

  c_tree #(.N(AW)) u_done (.rst, .in(addr_t | addr_f), .y(done));
  delay_line #(.W(1), .DELAY(DELAY)) u_dly (.d(done), .q(done_d));

  assign en     = done & done_d;
  assign data_t = {DW{en}} & mem_data;
  assign data_f = {DW{en}} & ~mem_data;
endmodule
