// mem_wr_adapter: write adapter between dual-rail address and data bundles and
// a single-rail memory (write side of DMEMAdp).
//
// When every address and data bit is valid, a C-element tree rises; after a
// matched delay (address and data set-up) the write strobe rises, the memory
// stores the word on that edge, and the strobe doubles as the write
// acknowledge. When the bundles return to NULL the strobe and the acknowledge
// fall at once. The true rails drive the memory's address and data pins.
// Reset must be held longer than DELAY so that the delay line has settled
// to 0 before the first address arrives.
//
// The adapter's role follows the thesis; using the delayed strobe itself as
// the write acknowledge is this design's choice.
`timescale 1ps/1ps
module mem_wr_adapter #(
  parameter int unsigned AW    = 12,
  parameter int unsigned DW    = 8,
  parameter int unsigned DELAY = 400
) (
  input  logic          rst,
  input  logic [AW-1:0] addr_t, addr_f,
  input  logic [DW-1:0] data_t, data_f,
  output logic [AW-1:0] mem_addr,
  output logic [DW-1:0] mem_data,
  output logic          mem_we,     // write strobe, memory writes on its rising edge
  output logic          ack
);
  logic done, done_d;

  c_tree #(.N(AW+DW)) u_done (.rst, .in({addr_t | addr_f, data_t | data_f}), .y(done));
  delay_line #(.W(1), .DELAY(DELAY)) u_dly (.d(done), .q(done_d));

  assign mem_addr = addr_t;
  assign mem_data = data_t;
  assign mem_we   = done & done_d;
  assign ack      = mem_we;
endmodule
