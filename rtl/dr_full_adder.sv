`timescale 1ps/1ps
// dr_full_adder: dual-rail full adder in DIMS style.
//
// Each of the eight minterms of (a, b, cin) is a 3-input C-element over one
// rail of each input. The minterms are ORed into the rails of sum and carry,
// so both outputs are valid only when all three inputs are valid and NULL only
// when all three are NULL.
// In the core the adders of ID lie on the ID handshake ring (the PC they
// compute is written back and acknowledged before the next fetch), so tools
// report circular logic through these minterms; the adder itself has no
// combinational loop.
//
// The thesis builds its adders from dual-rail basic elements; the
// eight-minterm DIMS form is this design's choice of how.
module dr_full_adder (
  input  logic rst,
  input  logic a_t, a_f,
  input  logic b_t, b_f,
  input  logic c_t, c_f,
  output logic s_t, s_f,
  output logic co_t, co_f
);
  logic [7:0] m;  // m[{a,b,c}]

  for (genvar i = 0; i < 8; i++) begin : g_min
    c_tree #(.N(3)) u_m (
      .rst,
      .in({ (i[2] ? a_t : a_f), (i[1] ? b_t : b_f), (i[0] ? c_t : c_f) }),
      .y (m[i])
    );
  end

  // sum = odd parity, carry = majority
  assign s_t  = m[1] | m[2] | m[4] | m[7];
  assign s_f  = m[0] | m[3] | m[5] | m[6];
  assign co_t = m[3] | m[5] | m[6] | m[7];
  assign co_f = m[0] | m[1] | m[2] | m[4];
endmodule
