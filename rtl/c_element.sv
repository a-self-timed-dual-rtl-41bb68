`timescale 1ps/1ps
// c_element: two-input Muller C-element with reset.
//
// The output copies the inputs when they agree and holds its value while they
// differ: 00 -> 0, 11 -> 1, 01/10 -> no change. An active-high reset forces the
// output to 0, which is the power-on state the stall controller relies on.
// Written as a transparent latch whose enable is "inputs agree"; this is the
// state-holding gate of the design, so the latch that tools report here is
// intended. Zero delay; no clock.
// Inside the core every C-element sits on a handshake ring (its output comes
// back to its inputs through the acknowledge of the next stage), so tools
// report circular combinational logic through it; that ring is the 4-phase
// protocol. Verilator's lint may also say it finds no latch in this block, as
// it cannot see that the hold branch stores state; the hold is intended.
//
// The C-element and its reset to 0 follow the thesis; writing it as a latch is
// this design's choice.
module c_element (
  input  logic rst,
  input  logic a,
  input  logic b,
  output logic y
);
  always_latch begin
    if (rst)         y = 1'b0;
    else if (a == b) y = a;
  end
endmodule
