// wb_stage: write-back stage of APIC18S.
//
// WB writes nothing until every bit of the EXE result bundle is valid: a
// ripple adder produces its low bits first, and writing them early would feed
// a half-finished WREG back to OF. Once the bundle is complete, the
// destination steers the result to WREG, BSR (low nibble) or the data-memory
// write adapter, and each STATUS flag whose mask bit is set is written; the
// others are left NULL and do not change. Each destination reports done
// either through its write acknowledge or, when not addressed, at once; an
// N-input C-element over the five done signals forms ack_final, which tells
// the stall controller in ID that this instruction has finished and also
// acknowledges the WB stage latch. Everything returns to NULL, and ack_final
// to 0, after the bundle does.
//
// Writing back only after the whole result is complete, and signalling the
// stall controller with ack_final, follow the thesis; the per-destination done
// signals and the C-element over them are this design's way of forming
// ack_final.
`timescale 1ps/1ps
module wb_stage
  import apic_pkg::*;
(
  input  logic               rst,
  input  logic [RES_W-1:0]   i_t, i_f,
  output logic [7:0]         wreg_din_t, wreg_din_f,
  input  logic [7:0]         wreg_ack,
  output logic [7:0]         bsr_din_t, bsr_din_f,
  input  logic [7:0]         bsr_ack,
  output logic [7:0]         st_din_t, st_din_f,
  input  logic [7:0]         st_ack,
  output logic [DADDR_W-1:0] maddr_t, maddr_f,
  output logic [7:0]         mdata_t, mdata_f,
  input  logic               mack,
  output logic               ack_final
);
  res_t it, if_;
  assign it  = i_t;
  assign if_ = i_f;

  logic all_valid;
  assign all_valid = &(i_t | i_f);

  logic is_w, is_b, is_m;
  assign is_w = all_valid & (it.dest == DST_WREG);
  assign is_b = all_valid & (it.dest == DST_BSR);
  assign is_m = all_valid & (it.dest == DST_MEM);

  assign wreg_din_t = {8{is_w}} & it.result;
  assign wreg_din_f = {8{is_w}} & if_.result;
  assign bsr_din_t  = {8{is_b}} & {4'h0, it.result[3:0]};
  assign bsr_din_f  = {8{is_b}} & {4'hF, if_.result[3:0]};
  assign maddr_t    = {DADDR_W{is_m}} & it.addr;
  assign maddr_f    = {DADDR_W{is_m}} & if_.addr;
  assign mdata_t    = {8{is_m}} & it.result;
  assign mdata_f    = {8{is_m}} & if_.result;

  logic [NFLAG-1:0] wr_flag;
  assign wr_flag  = {NFLAG{all_valid}} & it.st_mask;
  assign st_din_t = {3'b000, wr_flag & it.flags};
  assign st_din_f = {3'b000, wr_flag & if_.flags};

  logic d_w, d_b, d_m, d_s, d_v;
  assign d_w = (is_w & (&wreg_ack)) | (all_valid & ~is_w);
  assign d_b = (is_b & (&bsr_ack))  | (all_valid & ~is_b);
  assign d_m = (is_m & mack)        | (all_valid & ~is_m);
  assign d_s = all_valid & (&(st_ack[NFLAG-1:0] | ~wr_flag));
  assign d_v = all_valid;

  c_tree #(.N(5)) u_final (.rst, .in({d_w, d_b, d_m, d_s, d_v}), .y(ack_final));
endmodule
