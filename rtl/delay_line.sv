// delay_line: behavioural model of a matched delay element.
//
// Behavioural model, not synthesizable logic: in silicon this is a chain of
// buffers sized to a path's delay. Every bit of d appears on q DELAY time units
// (picoseconds) later. The memory adapters use it as the bundled-data delay
// that covers the memory access time, and the core uses one per pipeline stage
// to give the otherwise zero-delay RTL the stage latencies the timing
// assumption of the stall policy is stated in.
//
// The thesis gives the stage delays that the core's defaults use; modelling
// them as one lumped delay per stage output is this design's choice.
`timescale 1ps/1ps
module delay_line #(
  parameter int unsigned W     = 1,
  parameter int unsigned DELAY = 100
) (
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  assign #(DELAY) q = d;
endmodule
