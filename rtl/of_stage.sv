// of_stage: operand fetch stage of APIC18S.
//
// Three DeMUX-MERGE pairs decide, per instruction, which storage is read:
//  * address bundle, steered by rd_mem: to the data-memory read adapter
//    (readMEM) or past it; the MERGE of the memory data with the bypassed low
//    address byte (the literal of literal instructions) is source1.
//  * imm2 bundle, steered by rd_wreg: its arrival on the WREG path raises
//    readWREG; the MERGE of WREG's read data with the bypassed imm2 is
//    source2.
//  * the constant carry-in, steered by cin = C: its arrival on the STATUS path
//    reads STATUS; the MERGE of STATUS.C with the constant is the carry-in.
// Instructions that need none of these storages pass without touching them.
// After the MERGEs an optional swap exchanges the two sources and the
// Complement block inverts source2 for subtraction (by exchanging its rails).
// The function, destination, flag mask and address are forwarded to EXE.
//
// The thesis adds DeMUX-MERGE pairs for the memory and WREG operands, and a
// Complement block for subtraction; the third pair for the carry-in and the
// swap (for ADDWFC, SUBWFB, SUBFWB and the rotates through carry) are this
// design's additions.
`timescale 1ps/1ps
module of_stage
  import apic_pkg::*;
(
  input  logic               rst,
  input  logic [CTRL_W-1:0]  c_t, c_f,
  output logic               wreg_rd_t, wreg_rd_f,
  input  logic [7:0]         wreg_t, wreg_f,
  output logic               st_rd_t, st_rd_f,
  input  logic [7:0]         st_t, st_f,
  output logic [DADDR_W-1:0] maddr_t, maddr_f,
  input  logic [7:0]         mdata_t, mdata_f,
  output logic [OPND_W-1:0]  o_t, o_f,
  output logic               mem_read,     // a token took the memory path
  output logic               wreg_read     // a token took the WREG path
);
  ctrl_t ct, cf;
  assign ct = c_t;
  assign cf = c_f;

  // ---- source1: data memory or bypassed address field
  logic [DADDR_W-1:0] byp_a_t, byp_a_f;
  dr_demux #(.W(DADDR_W)) u_dm_mem (
    .rst, .in_t(ct.addr), .in_f(cf.addr), .sel_t(ct.rd_mem), .sel_f(cf.rd_mem),
    .a_t(maddr_t), .a_f(maddr_f), .b_t(byp_a_t), .b_f(byp_a_f)
  );
  logic [7:0] s1_t, s1_f;
  assign s1_t = mdata_t | byp_a_t[7:0];
  assign s1_f = mdata_f | byp_a_f[7:0];
  assign mem_read = |(maddr_t | maddr_f);

  // ---- source2: WREG or bypassed imm2
  logic [7:0] wp_t, wp_f, byp_i_t, byp_i_f;
  dr_demux #(.W(8)) u_dm_wreg (
    .rst, .in_t(ct.imm2), .in_f(cf.imm2), .sel_t(ct.rd_wreg), .sel_f(cf.rd_wreg),
    .a_t(wp_t), .a_f(wp_f), .b_t(byp_i_t), .b_f(byp_i_f)
  );
  c_tree #(.N(8)) u_rdw (.rst, .in(wp_t | wp_f), .y(wreg_rd_t));
  assign wreg_rd_f = 1'b0;
  assign wreg_read = wreg_rd_t;
  logic [7:0] s2_t, s2_f;
  assign s2_t = wreg_t | byp_i_t;
  assign s2_f = wreg_f | byp_i_f;

  // ---- carry-in: STATUS.C or constant (cin[0] is the constant, cin[1] selects C)
  logic cp_t, cp_f, cb_t, cb_f, ci_t, ci_f;
  dr_demux #(.W(1)) u_dm_c (
    .rst, .in_t(ct.cin[0]), .in_f(cf.cin[0]), .sel_t(ct.cin[1]), .sel_f(cf.cin[1]),
    .a_t(cp_t), .a_f(cp_f), .b_t(cb_t), .b_f(cb_f)
  );
  assign st_rd_t = cp_t | cp_f;
  assign st_rd_f = 1'b0;
  assign ci_t = st_t[ST_C] | cb_t;
  assign ci_f = st_f[ST_C] | cb_f;

  // ---- swap and complement
  logic [7:0] x1_t, x1_f, x2_t, x2_f, y2_t, y2_f;
  assign x1_t = ({8{cf.swap}} & s1_t) | ({8{ct.swap}} & s2_t);
  assign x1_f = ({8{cf.swap}} & s1_f) | ({8{ct.swap}} & s2_f);
  assign x2_t = ({8{cf.swap}} & s2_t) | ({8{ct.swap}} & s1_t);
  assign x2_f = ({8{cf.swap}} & s2_f) | ({8{ct.swap}} & s1_f);
  assign y2_t = ({8{cf.comp2}} & x2_t) | ({8{ct.comp2}} & x2_f);
  assign y2_f = ({8{cf.comp2}} & x2_f) | ({8{ct.comp2}} & x2_t);

  // ---- output bundle
  opnd_t ot, of;
  always_comb begin
    ot.x.fn = ct.fn;  ot.x.dest = ct.dest;  ot.x.st_mask = ct.st_mask;  ot.x.addr = ct.addr;
    of.x.fn = cf.fn;  of.x.dest = cf.dest;  of.x.st_mask = cf.st_mask;  of.x.addr = cf.addr;
    ot.s1 = x1_t;  of.s1 = x1_f;
    ot.s2 = y2_t;  of.s2 = y2_f;
    ot.cin = ci_t; of.cin = ci_f;
  end
  assign o_t = ot;
  assign o_f = of;
endmodule
