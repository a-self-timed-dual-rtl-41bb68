// id_stage: instruction decode stage of APIC18S.
//
// Inputs are the dual-rail PC and instruction held by the ID stage latch. Four
// parts work side by side:
//  * Stall controller: the opCode bit inst[15] passes through stall_ctrl. The
//    stall select is 1 when the previous instruction leaving ID writes WREG,
//    STATUS, BSR or data memory; the bit then waits for ack_final from WB,
//    i.e. for that instruction to finish writing back. ack_final is accepted
//    only when it belongs to the most recently issued instruction (a 3-bit
//    count of issued and of retired instructions must agree).
//  * Two dual-rail ripple adders compute PC+1 and PC+offset+1 as soon as the
//    PC and the instruction are valid, independently of the stall.
//  * Branch controller: selects the next PC. Non-branches and BRA produce it
//    at once; a conditional branch raises readSTATUS once its opCode bit has
//    passed the stall controller and selects taken/not taken from STATUS.
//  * Control signal generator and address mapping (id_decode): waits for the
//    full instruction including the stalled opCode bit, reads BSR when the
//    instruction uses banked addressing (a = 1), and emits the control word.
// Every output bundle follows the 4-phase protocol: valid when its inputs are
// complete, NULL when they have all returned to NULL. The stall select is
// updated from the control word of the instruction that just left, at the
// moment its control output returns to NULL, so it never changes under a
// valid token.
//
// The stall select, the write flag and the issued/retired counts are the only
// flip-flops; they are clocked by completion edges and reset asynchronously
// on the rising edge of rst. The document gives the stall controller, the
// adders and the branch controller; the ack qualification and the decode
// encodings (standard PIC18) are this design's own. In the core the opCode
// path is part of the ring ID -> OF -> EXE -> WB -> ack_final -> ID, so tools
// report circular logic through opc_t/opc_f; that ring is the stall
// mechanism.
`timescale 1ps/1ps
module id_stage
  import apic_pkg::*;
(
  input  logic              rst,
  input  logic [PC_W-1:0]   pc_t, pc_f,
  input  logic [INST_W-1:0] inst_t, inst_f,
  input  logic              ack_final,
  output logic              st_rd_t, st_rd_f,
  input  logic [7:0]        st_t, st_f,
  output logic              bsr_rd_t, bsr_rd_f,
  input  logic [7:0]        bsr_t, bsr_f,
  output logic [PC_W-1:0]   npc_t, npc_f,
  output logic [CTRL_W-1:0] ctrl_t_o, ctrl_f_o,
  output logic              stalled
);
  // ------------------------------------------------------------ stall control
  logic opc_t, opc_f, stall_sel, ack_ok;

  // the dual-rail stall select travels with the token: valid while the rest
  // of the instruction is valid, NULL with it
  logic lo_valid, lo_null, ss_t, ss_f;
  assign lo_valid = &(inst_t[14:0] | inst_f[14:0]);
  assign lo_null  = ~|(inst_t[14:0] | inst_f[14:0]);
  dr_hold #(.W(1)) u_ssel (.rst, .go_valid(lo_valid), .go_null(lo_null), .y(stall_sel),
                           .q_t(ss_t), .q_f(ss_f));

  stall_ctrl u_stall (
    .rst, .in_t(inst_t[15]), .in_f(inst_f[15]),
    .stall_t(ss_t), .stall_f(ss_f),
    .ack(ack_ok), .out_t(opc_t), .out_f(opc_f), .stalled
  );

  // full instruction as seen after the stall controller
  logic [INST_W-1:0] fi_t, fi_f;
  assign fi_t = {opc_t, inst_t[14:0]};
  assign fi_f = {opc_f, inst_f[14:0]};

  logic fi_valid, fi_null;
  assign fi_valid = &(fi_t | fi_f);
  assign fi_null  = ~|(fi_t | fi_f);

  // ------------------------------------------------ control signal generator
  logic  needs_bank;
  ctrl_t dec;
  id_decode u_dec (.inst(fi_t), .bsr(bsr_t[3:0]), .needs_bank, .ctrl(dec));

  assign bsr_rd_t = fi_valid & needs_bank;
  assign bsr_rd_f = fi_valid & ~needs_bank;

  logic bsr_valid, bsr_null;
  assign bsr_valid = &(bsr_t | bsr_f);
  assign bsr_null  = ~|(bsr_t | bsr_f);

  dr_hold #(.W(CTRL_W)) u_ctrl (
    .rst, .go_valid(fi_valid & bsr_valid), .go_null(fi_null & bsr_null),
    .y(dec), .q_t(ctrl_t_o), .q_f(ctrl_f_o)
  );

  // stall select: previous instruction writes state
  logic  ctrl_done, wr_cap;
  ctrl_t ctrl_q;
  assign ctrl_q = ctrl_t_o;
  c_tree #(.N(CTRL_W)) u_cdone (.rst, .in(ctrl_t_o | ctrl_f_o), .y(ctrl_done));

  always_ff @(posedge ctrl_done or posedge rst) begin
    if (rst) wr_cap <= 1'b0;
    else     wr_cap <= writes_state(ctrl_q);
  end

  always_ff @(negedge ctrl_done or posedge rst) begin
    if (rst) stall_sel <= 1'b0;
    else     stall_sel <= wr_cap;
  end

  // ack qualification: ack_final stays high until the spacer behind an
  // instruction reaches WB, which can be after a younger instruction has been
  // issued. Counting issued and retired instructions lets only the ack of the
  // most recently issued instruction through.
  logic [2:0] n_issued, n_retired;
  always_ff @(posedge ctrl_done or posedge rst) begin
    if (rst) n_issued <= '0;
    else     n_issued <= n_issued + 3'd1;
  end
  always_ff @(posedge ack_final or posedge rst) begin
    if (rst) n_retired <= '0;
    else     n_retired <= n_retired + 3'd1;
  end
  assign ack_ok = ack_final & (n_issued == n_retired);

  // ----------------------------------------------------------------- adders
  logic any_valid_pc;             // a rail of pc[0] is up: source of constants
  assign any_valid_pc = pc_t[0] | pc_f[0];

  logic [PC_W-1:0] inc_t, inc_f, inc_co_t, inc_co_f;
  dr_ripple_adder #(.W(PC_W)) u_add1 (
    .rst, .a_t(pc_t), .a_f(pc_f),
    .b_t('0), .b_f({PC_W{any_valid_pc}}),
    .ci_t(any_valid_pc), .ci_f(1'b0),
    .s_t(inc_t), .s_f(inc_f), .co_t(inc_co_t), .co_f(inc_co_f)
  );

  // branch offset: 11-bit for BRA (1101 0nnn), 8-bit for conditional branches
  logic [PC_W-1:0] off, off_t, off_f;
  assign off = (inst_t[14:11] == 4'b1010) ? PC_W'(signed'(inst_t[10:0]))
                                          : PC_W'(signed'(inst_t[7:0]));
  dr_hold #(.W(PC_W)) u_off (.rst, .go_valid(lo_valid), .go_null(lo_null), .y(off),
                             .q_t(off_t), .q_f(off_f));

  logic [PC_W-1:0] tgt_t, tgt_f, tgt_co_t, tgt_co_f;
  dr_ripple_adder #(.W(PC_W)) u_add2 (
    .rst, .a_t(pc_t), .a_f(pc_f), .b_t(off_t), .b_f(off_f),
    .ci_t(any_valid_pc), .ci_f(1'b0),
    .s_t(tgt_t), .s_f(tgt_f), .co_t(tgt_co_t), .co_f(tgt_co_f)
  );

  // ------------------------------------------------------ branch controller
  logic raw_valid, raw_null, is_cbr, is_bra;
  assign raw_valid = &(inst_t | inst_f);
  assign raw_null  = ~|(inst_t | inst_f);
  assign is_cbr    = (inst_t[15:11] == 5'b11100);
  assign is_bra    = (inst_t[15:11] == 5'b11010);

  // readSTATUS leaves through the stall controller: only after the opCode bit
  // has passed does the branch look at STATUS
  assign st_rd_t = (opc_t | opc_f) & is_cbr & raw_valid;
  assign st_rd_f = 1'b0;

  logic st_valid, st_null, cond;
  assign st_valid = &(st_t | st_f);
  assign st_null  = ~|(st_t | st_f);

  always_comb begin
    unique case (inst_t[10:8])
      3'd0: cond =  st_t[ST_Z];   // BZ
      3'd1: cond = ~st_t[ST_Z];   // BNZ
      3'd2: cond =  st_t[ST_C];   // BC
      3'd3: cond = ~st_t[ST_C];   // BNC
      3'd4: cond =  st_t[ST_OV];  // BOV
      3'd5: cond = ~st_t[ST_OV];  // BNOV
      3'd6: cond =  st_t[ST_N];   // BN
      default: cond = ~st_t[ST_N];// BNN
    endcase
  end

  logic sums_valid, sums_null, take;
  assign sums_valid = &(inc_t | inc_f) & &(tgt_t | tgt_f);
  assign sums_null  = ~|(inc_t | inc_f | tgt_t | tgt_f);
  assign take       = is_bra | (is_cbr & cond);

  dr_hold #(.W(PC_W)) u_npc (
    .rst,
    .go_valid(raw_valid & sums_valid & (~is_cbr | st_valid)),
    .go_null (raw_null & sums_null & st_null),
    .y(take ? tgt_t : inc_t), .q_t(npc_t), .q_f(npc_f)
  );
endmodule
