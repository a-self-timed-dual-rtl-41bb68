`timescale 1ps/1ps
// dr_ripple_adder: W-bit dual-rail ripple-carry adder built from DIMS full
// adders.
//
// The carry ripples through W dual-rail full adders, so the sum completes when
// the last carry is valid. Besides the sum it brings out the carry into every
// bit position (co[i] is the carry out of bit i), from which EXE derives the
// digit carry and overflow flags. All outputs follow the inputs' 4-phase
// protocol: valid once all inputs are valid, NULL once all are NULL.
//
// The 8-bit dual-rail ripple adder follows the thesis; bringing out every
// carry for the flags is this design's choice.
module dr_ripple_adder #(
  parameter int unsigned W = 8
) (
  input  logic         rst,
  input  logic [W-1:0] a_t, a_f,
  input  logic [W-1:0] b_t, b_f,
  input  logic         ci_t, ci_f,
  output logic [W-1:0] s_t, s_f,
  output logic [W-1:0] co_t, co_f
);
  logic [W:0] c_t, c_f;
  assign c_t[0] = ci_t;
  assign c_f[0] = ci_f;

  for (genvar i = 0; i < W; i++) begin : g_bit
    dr_full_adder u_fa (
      .rst,
      .a_t(a_t[i]), .a_f(a_f[i]),
      .b_t(b_t[i]), .b_f(b_f[i]),
      .c_t(c_t[i]), .c_f(c_f[i]),
      .s_t(s_t[i]), .s_f(s_f[i]),
      .co_t(c_t[i+1]), .co_f(c_f[i+1])
    );
  end

  assign co_t = c_t[W:1];
  assign co_f = c_f[W:1];
endmodule
