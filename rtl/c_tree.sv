`timescale 1ps/1ps
// c_tree: N-input C-element, used as the completion detector of a bundle.
//
// The output rises when every input is 1, falls when every input is 0 and holds
// otherwise. It plays the role of the "costless" many-input C-element (AND
// gate, NOR gate and a set/reset latch) used when a bundle is wide. Reset
// forces 0. The latch reported by tools is the intended state of the element.
// As a completion detector it sits on a handshake ring in the core, so tools
// report circular logic through it; Verilator's lint may also say it finds no
// latch here. Both are the intended state-holding behaviour.
//
// The thesis names the many-input C-element for completion detection; this
// behavioural latch form is this design's choice.
module c_tree #(
  parameter int unsigned N = 2
) (
  input  logic         rst,
  input  logic [N-1:0] in,
  output logic         y
);
  always_latch begin
    if (rst)          y = 1'b0;
    else if (&in)     y = 1'b1;
    else if (~|in)    y = 1'b0;
  end
endmodule
