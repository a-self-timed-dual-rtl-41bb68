`timescale 1ps/1ps
// dr_demux: the DeMUX half of a DeMUX-MERGE pair.
//
// Every input rail meets both rails of the select in a C-element: with sel
// valid 1 the bundle leaves on path A, with sel valid 0 on path B, and the
// other path stays NULL. The matching MERGE is a plain OR of the paths' rails
// wherever the paths rejoin. Because only the selected path sees valid data,
// an operation pays only for the delay of the path it takes. The select is
// dual-rail data of the same token: it must become valid with the input and
// return to NULL with it, or the selected path would hold its last value.
//
// The two C-elements per rail, the OR-gate MERGE and the rule that only the
// selected path sees data follow the thesis; the parameterised width is this
// design's.
module dr_demux #(
  parameter int unsigned W = 1
) (
  input  logic         rst,
  input  logic [W-1:0] in_t, in_f,
  input  logic         sel_t, sel_f,
  output logic [W-1:0] a_t, a_f,   // taken when sel = 1
  output logic [W-1:0] b_t, b_f    // taken when sel = 0
);
  for (genvar i = 0; i < W; i++) begin : g_bit
    c_element u_at (.rst, .a(in_t[i]), .b(sel_t), .y(a_t[i]));
    c_element u_af (.rst, .a(in_f[i]), .b(sel_t), .y(a_f[i]));
    c_element u_bt (.rst, .a(in_t[i]), .b(sel_f), .y(b_t[i]));
    c_element u_bf (.rst, .a(in_f[i]), .b(sel_f), .y(b_f[i]));
  end
endmodule
