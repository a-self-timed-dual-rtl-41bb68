`timescale 1ps/1ps
// dr_hold: dual-rail output register of a function block.
//
// A stage computes its function single-rail from the true rails of its inputs;
// dr_hold turns the result back into a dual-rail bundle with DIMS behaviour:
// it shows the result (y on the t rails, ~y on the f rails) when the inputs
// are all valid (go_valid), drops to NULL when the inputs are all NULL
// (go_null), and holds in between. This gives the same strong indication as a
// block built gate by gate from dual-rail elements. Reset forces NULL. The
// latches tools report here are the intended hold state.
//
// This element is this design's own: the thesis builds function blocks gate by
// gate from dual-rail elements, and dr_hold gives the same valid/NULL ordering
// for the wider decode and logic functions.
module dr_hold #(
  parameter int unsigned W = 8
) (
  input  logic         rst,
  input  logic         go_valid,
  input  logic         go_null,
  input  logic [W-1:0] y,
  output logic [W-1:0] q_t, q_f
);
  always_latch begin
    if (rst || go_null) begin
      q_t = '0;
      q_f = '0;
    end else if (go_valid) begin
      q_t = y;
      q_f = ~y;
    end
  end
endmodule
