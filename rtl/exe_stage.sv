// exe_stage: execution stage of APIC18S.
//
// A DeMUX-MERGE pair steered by "function is ADD" sends the operands either
// to the 8-bit dual-rail ripple adder (add, subtract, increment, decrement,
// negate) or to the logic/rotate block (AND, IOR, XOR, pass, rotates through
// or without carry, nibble swap); the other path stays NULL, so each
// instruction pays only for the path it uses. The adder path derives C (carry
// out of bit 7), DC (carry out of bit 3) and OV (carry into bit 7 XOR carry
// out) from the adder's carry chain. After the MERGE, Z and N are computed
// from the merged result. Destination, flag mask and address are forwarded to
// WB alongside the result.
//
// Interface: i_t/i_f is the operand bundle from the OF/EXE latch, o_t/o_f the
// result bundle for the EXE/WB latch; used_adder is high while a token is on
// the adder path. Timing: zero-delay logic; the result is valid only after
// the slower of the two paths has finished for this token and returns to
// NULL after the operands do.
//
// The top-level DeMUX-MERGE between adder and logic path and the 8-bit
// dual-rail ripple adder follow the thesis. The thesis also describes pairs
// inside the sub-stages of the earlier combined EXE/WB stage without naming
// those sub-stages; they are not built here. Deriving the flags from the carry
// chain, and forming all logic functions except AND by a hold element, are
// this design's choices.
`timescale 1ps/1ps
module exe_stage
  import apic_pkg::*;
(
  input  logic              rst,
  input  logic [OPND_W-1:0] i_t, i_f,
  output logic [RES_W-1:0]  o_t, o_f,
  output logic              used_adder
);
  opnd_t it, if_;
  assign it  = i_t;
  assign if_ = i_f;

  // select: function is ADD
  logic fn_valid, fn_null, sel_t, sel_f;
  assign fn_valid = &(it.x.fn | if_.x.fn);
  assign fn_null  = ~|(it.x.fn | if_.x.fn);
  dr_hold #(.W(1)) u_sel (.rst, .go_valid(fn_valid), .go_null(fn_null),
                          .y(it.x.fn == FN_ADD), .q_t(sel_t), .q_f(sel_f));

  // DeMUX of {s1, s2, cin}
  localparam int unsigned OW = 17;
  logic [OW-1:0] a_t, a_f, b_t, b_f;
  dr_demux #(.W(OW)) u_dm (
    .rst, .in_t({it.s1, it.s2, it.cin}), .in_f({if_.s1, if_.s2, if_.cin}),
    .sel_t, .sel_f, .a_t, .a_f, .b_t, .b_f
  );
  assign used_adder = |(a_t | a_f);

  // ---- adder path
  logic [7:0] sum_t, sum_f, co_t, co_f;
  dr_ripple_adder #(.W(8)) u_add (
    .rst, .a_t(a_t[16:9]), .a_f(a_f[16:9]), .b_t(a_t[8:1]), .b_f(a_f[8:1]),
    .ci_t(a_t[0]), .ci_f(a_f[0]), .s_t(sum_t), .s_f(sum_f), .co_t, .co_f
  );
  logic        ad_valid, ad_null;
  logic [10:0] ad_y, ad_t, ad_f;   // {result, OV, DC, C}
  assign ad_valid = &(sum_t | sum_f) & &(co_t | co_f);
  assign ad_null  = ~|(sum_t | sum_f | co_t | co_f);
  assign ad_y     = {sum_t, co_t[6] ^ co_t[7], co_t[3], co_t[7]};
  dr_hold #(.W(11)) u_adh (.rst, .go_valid(ad_valid), .go_null(ad_null), .y(ad_y),
                           .q_t(ad_t), .q_f(ad_f));

  // ---- logic / rotate path
  logic [7:0]  s1, s2;
  logic        cin, lc;
  logic [7:0]  lr;
  assign s1  = b_t[16:9];
  assign s2  = b_t[8:1];
  assign cin = b_t[0];
  // AND is built from dual-rail AND gates; the other functions are formed
  // from the true rails and put back on two rails by the hold element below
  logic [7:0] and_t, and_f;
  for (genvar i = 0; i < 8; i++) begin : g_and
    dr_and2 u_and (.rst, .a_t(b_t[9+i]), .a_f(b_f[9+i]), .b_t(b_t[1+i]), .b_f(b_f[1+i]),
                   .y_t(and_t[i]), .y_f(and_f[i]));
  end
  always_comb begin
    lc = 1'b0;
    unique case (it.x.fn)
      FN_AND:   lr = and_t;
      FN_IOR:   lr = s1 | s2;
      FN_XOR:   lr = s1 ^ s2;
      FN_PASS2: lr = s2;
      FN_RLC:   begin lr = {s1[6:0], cin};   lc = s1[7]; end
      FN_RLNC:  lr = {s1[6:0], s1[7]};
      FN_RRC:   begin lr = {cin, s1[7:1]};   lc = s1[0]; end
      FN_RRNC:  lr = {s1[0], s1[7:1]};
      FN_SWAP:  lr = {s1[3:0], s1[7:4]};
      default:  lr = s1;  // FN_PASS1
    endcase
  end
  logic        lg_valid, lg_null;
  logic [10:0] lg_t, lg_f;
  assign lg_valid = &(b_t | b_f) & &(and_t | and_f) & fn_valid;
  assign lg_null  = ~|(b_t | b_f) & ~|(and_t | and_f);
  dr_hold #(.W(11)) u_lgh (.rst, .go_valid(lg_valid), .go_null(lg_null),
                           .y({lr, 1'b0, 1'b0, lc}), .q_t(lg_t), .q_f(lg_f));

  // ---- MERGE and Z/N
  logic [10:0] m_t, m_f;
  assign m_t = ad_t | lg_t;
  assign m_f = ad_f | lg_f;

  logic       m_valid, m_null;
  logic [7:0] r;
  assign m_valid = &(m_t | m_f);
  assign m_null  = ~|(m_t | m_f);
  assign r       = m_t[10:3];

  logic [12:0] rf_t, rf_f;   // {result, N, OV, Z, DC, C}
  dr_hold #(.W(13)) u_res (
    .rst, .go_valid(m_valid), .go_null(m_null),
    .y({r, r[7], m_t[2], (r == 8'h00), m_t[1], m_t[0]}), .q_t(rf_t), .q_f(rf_f)
  );

  res_t ot, of;
  always_comb begin
    ot.dest = it.x.dest;  ot.st_mask = it.x.st_mask;  ot.addr = it.x.addr;
    of.dest = if_.x.dest; of.st_mask = if_.x.st_mask; of.addr = if_.x.addr;
    ot.result = rf_t[12:5]; of.result = rf_f[12:5];
    ot.flags  = rf_t[4:0];  of.flags  = rf_f[4:0];
  end
  assign o_t = ot;
  assign o_f = of;
endmodule
