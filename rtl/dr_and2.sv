`timescale 1ps/1ps
// dr_and2: dual-rail 2-input AND gate in DIMS style.
//
// One C-element per combination of input rails: the (t,t) minterm drives
// out.t, the three minterms that contain an f rail are ORed into out.f. The
// output becomes valid only when both inputs are valid and returns to NULL only
// when both are NULL. Reset clears the four C-elements.
//
// The gate and its indication rule follow the thesis; the minterm structure is
// the usual DIMS construction. In the core it forms the AND function of the
// EXE logic path.
module dr_and2 (
  input  logic rst,
  input  logic a_t, a_f,
  input  logic b_t, b_f,
  output logic y_t, y_f
);
  logic m_ff, m_ft, m_tf, m_tt;

  c_element u_ff (.rst, .a(a_f), .b(b_f), .y(m_ff));
  c_element u_ft (.rst, .a(a_f), .b(b_t), .y(m_ft));
  c_element u_tf (.rst, .a(a_t), .b(b_f), .y(m_tf));
  c_element u_tt (.rst, .a(a_t), .b(b_t), .y(m_tt));

  assign y_t = m_tt;
  assign y_f = m_ff | m_ft | m_tf;
endmodule
