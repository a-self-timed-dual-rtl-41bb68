`timescale 1ps/1ps
// stall_ctrl: the APIC18S stall controller for one dual-rail bit (the opCode
// bit of the instruction).
//
// A DeMUX steered by the dual-rail stall select sends the bit either straight
// to the MERGE (bypass, no wait) or to a pair of C-elements, one per rail,
// whose second input is the single-rail ack from WB. A stalled bit therefore
// reaches the output only after the previous instruction has finished and
// ack has risen, and it returns to NULL after both the bit and ack have
// fallen. Because every later decode waits for all instruction bits, blocking
// this one bit blocks the whole instruction. All C-elements reset to 0, so the
// output starts NULL.
//
// The structure (DeMUX, C-element pair on the ack, MERGE) and the power-on
// state follow the thesis; the observation output stalled is this design's.
module stall_ctrl (
  input  logic rst,
  input  logic in_t, in_f,
  input  logic stall_t, stall_f,
  input  logic ack,
  output logic out_t, out_f,
  output logic stalled        // a token is on the stall path
);
  logic s_t, s_f, p_t, p_f, w_t, w_f;

  dr_demux #(.W(1)) u_demux (
    .rst, .in_t, .in_f, .sel_t(stall_t), .sel_f(stall_f),
    .a_t(s_t), .a_f(s_f), .b_t(p_t), .b_f(p_f)
  );

  c_element u_ct (.rst, .a(s_t), .b(ack), .y(w_t));
  c_element u_cf (.rst, .a(s_f), .b(ack), .y(w_f));

  assign out_t   = w_t | p_t;
  assign out_f   = w_f | p_f;
  assign stalled = s_t | s_f;
endmodule
