`timescale 1ps/1ps
// dr_pipe_latch: one stage latch of a 4-phase dual-rail Muller pipeline.
//
// Each rail passes through a C-element whose second input is the inverted
// acknowledge of the next stage, so a valid token is captured while the next
// stage is empty and a NULL spacer is captured once the next stage has taken
// the token. A per-bit OR and an N-input C-element detect completion: done
// rises when every bit of the latch is valid and falls when every bit is NULL;
// done is this stage's acknowledge to the previous one.
//
// The Muller pipeline latch follows the thesis; the C-element tree as
// completion detector is the usual construction, and the widths are this
// design's.
module dr_pipe_latch #(
  parameter int unsigned W = 8
) (
  input  logic         rst,
  input  logic [W-1:0] in_t, in_f,
  input  logic         ack_next,   // done of the following stage
  output logic [W-1:0] out_t, out_f,
  output logic         done
);
  logic en;
  assign en = ~ack_next;

  for (genvar i = 0; i < W; i++) begin : g_bit
    c_element u_t (.rst, .a(in_t[i]), .b(en), .y(out_t[i]));
    c_element u_f (.rst, .a(in_f[i]), .b(en), .y(out_f[i]));
  end

  c_tree #(.N(W)) u_done (.rst, .in(out_t | out_f), .y(done));
endmodule
