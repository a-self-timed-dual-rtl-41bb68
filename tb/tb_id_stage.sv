// tb_id_stage: ID driven with a 4-phase handshake, with real dual-rail STATUS
// and BSR registers behind its read ports and ack_final generated here. For
// random PIC18 instructions it checks, against values worked out here from
// the instruction set:
//  * the next PC (PC+1, BRA target, conditional branch taken or not from
//    STATUS);
//  * the destination, the STATUS flag mask and the physical data address
//    (access bank split at 80h, banked with BSR when a = 1);
//  * that an instruction following one that writes state is held in ID
//    (control word NULL, stalled flag set) until ack_final for the earlier
//    instruction arrives, also when the ack_final of an older instruction is
//    still high as it arrives, while one following a non-writer is not held.
`timescale 1ps/1ps
module tb_id_stage;
  import apic_pkg::*;
  logic rst, ack_final, st_rd_t, st_rd_f, bsr_rd_t, bsr_rd_f, stalled;
  logic [PC_W-1:0] pc_t, pc_f, npc_t, npc_f;
  logic [INST_W-1:0] inst_t, inst_f;
  logic [0:0][7:0] st_t, st_f, bsr_t, bsr_f;
  logic [CTRL_W-1:0] ctrl_t_o, ctrl_f_o;
  logic [7:0] sdin_t, sdin_f, sack, sq, bdin_t, bdin_f, back, bq;
  int checks = 0, failures = 0;

  id_stage dut (.rst, .pc_t, .pc_f, .inst_t, .inst_f, .ack_final, .st_rd_t, .st_rd_f,
    .st_t(st_t[0]), .st_f(st_f[0]), .bsr_rd_t, .bsr_rd_f, .bsr_t(bsr_t[0]), .bsr_f(bsr_f[0]),
    .npc_t, .npc_f, .ctrl_t_o, .ctrl_f_o, .stalled);
  dr_register #(.W(8), .NR(1)) u_s (.rst, .din_t(sdin_t), .din_f(sdin_f), .ack(sack),
    .rd_t(st_rd_t), .rd_f(st_rd_f), .dout_t(st_t), .dout_f(st_f), .q(sq));
  dr_register #(.W(8), .NR(1)) u_b (.rst, .din_t(bdin_t), .din_f(bdin_f), .ack(back),
    .rd_t(bsr_rd_t), .rd_f(bsr_rd_f), .dout_t(bsr_t), .dout_f(bsr_f), .q(bq));

  task automatic expect_eq(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  // Instruction templates: high byte pattern and the properties of the
  // instruction from the PIC18 instruction set.
  typedef struct {
    logic [7:0] hi, hmask;     // hi byte = hi | (random & ~hmask)
    bit file_op;               // uses f / a
    int dest;                  // 0 none, 1 d-bit selects, 2 memory, 3 WREG, 4 BSR
    logic [4:0] flags;         // N OV Z DC C
  } tmpl_t;
  tmpl_t tl [$];
  function automatic void add(logic [7:0] hi, logic [7:0] hmask, bit f, int d, logic [4:0] fl);
    tmpl_t t; t.hi = hi; t.hmask = hmask; t.file_op = f; t.dest = d; t.flags = fl; tl.push_back(t);
  endfunction

  initial begin
    #200_000_000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    bit prev_writes;
    int n_stale = 0, n_stall = 0, n_taken = 0, n_not = 0, n_bank = 0;
    add(8'h24, 8'hFC, 1, 1, 5'h1F);  // ADDWF
    add(8'h20, 8'hFC, 1, 1, 5'h1F);  // ADDWFC
    add(8'h14, 8'hFC, 1, 1, 5'h14);  // ANDWF
    add(8'h10, 8'hFC, 1, 1, 5'h14);  // IORWF
    add(8'h18, 8'hFC, 1, 1, 5'h14);  // XORWF
    add(8'h1C, 8'hFC, 1, 1, 5'h14);  // COMF
    add(8'h04, 8'hFC, 1, 1, 5'h1F);  // DECF
    add(8'h28, 8'hFC, 1, 1, 5'h1F);  // INCF
    add(8'h50, 8'hFC, 1, 1, 5'h14);  // MOVF
    add(8'h34, 8'hFC, 1, 1, 5'h15);  // RLCF
    add(8'h44, 8'hFC, 1, 1, 5'h14);  // RLNCF
    add(8'h30, 8'hFC, 1, 1, 5'h15);  // RRCF
    add(8'h40, 8'hFC, 1, 1, 5'h14);  // RRNCF
    add(8'h38, 8'hFC, 1, 1, 5'h00);  // SWAPF
    add(8'h54, 8'hFC, 1, 1, 5'h1F);  // SUBFWB
    add(8'h5C, 8'hFC, 1, 1, 5'h1F);  // SUBWF
    add(8'h58, 8'hFC, 1, 1, 5'h1F);  // SUBWFB
    add(8'h6A, 8'hFE, 1, 2, 5'h04);  // CLRF
    add(8'h68, 8'hFE, 1, 2, 5'h00);  // SETF
    add(8'h6E, 8'hFE, 1, 2, 5'h00);  // MOVWF
    add(8'h6C, 8'hFE, 1, 2, 5'h1F);  // NEGF
    add(8'h90, 8'hF0, 1, 2, 5'h00);  // BCF
    add(8'h80, 8'hF0, 1, 2, 5'h00);  // BSF
    add(8'h70, 8'hF0, 1, 2, 5'h00);  // BTG
    add(8'h0F, 8'hFF, 0, 3, 5'h1F);  // ADDLW
    add(8'h0B, 8'hFF, 0, 3, 5'h14);  // ANDLW
    add(8'h09, 8'hFF, 0, 3, 5'h14);  // IORLW
    add(8'h0A, 8'hFF, 0, 3, 5'h14);  // XORLW
    add(8'h0E, 8'hFF, 0, 3, 5'h00);  // MOVLW
    add(8'h08, 8'hFF, 0, 3, 5'h1F);  // SUBLW
    add(8'h01, 8'hFF, 0, 4, 5'h00);  // MOVLB
    add(8'h00, 8'hFF, 0, 0, 5'h00);  // NOP
    add(8'hD0, 8'hF8, 0, 0, 5'h00);  // BRA
    add(8'hE0, 8'hF8, 0, 0, 5'h00);  // BZ .. BNN
    add(8'hE0, 8'hF8, 0, 0, 5'h00);

    rst = 0; #1;   // then a rising edge for the asynchronously reset flip-flops
    rst = 1; pc_t = 0; pc_f = 0; inst_t = 0; inst_f = 0; ack_final = 0;
    sdin_t = 0; sdin_f = 0; bdin_t = 0; bdin_f = 0;
    #10 rst = 0; #10;
    prev_writes = 0;
    for (int n = 0; n < 1500; n++) begin
      tmpl_t t;
      logic [15:0] inst;
      logic [9:0] pc, exp_npc;
      logic [7:0] sv, bv, f;
      ctrl_t ct, cf;
      int exp_dest;
      logic [11:0] exp_addr;
      logic taken;
      t = tl[$urandom_range(0, tl.size() - 1)];
      inst = {t.hi | (8'($urandom) & ~t.hmask), 8'($urandom)};
      if (t.dest == 4) inst[7:4] = 0;
      if (t.hi == 8'h00) inst[7:0] = 0;
      pc = 10'($urandom);
      sv = {3'b0, 5'($urandom)}; bv = {4'b0, 4'($urandom)};
      sdin_t = sv; sdin_f = ~sv; bdin_t = bv; bdin_f = ~bv;
      #10 sdin_t = 0; sdin_f = 0; bdin_t = 0; bdin_f = 0; #10;
      // expected next PC
      exp_npc = pc + 10'd1;
      taken = 0;
      if (inst[15:11] == 5'b11010) exp_npc = pc + 10'd1 + 10'($signed(inst[10:0]));
      if (inst[15:11] == 5'b11100) begin
        case (inst[10:8])
          3'd0: taken = sv[2];  3'd1: taken = !sv[2];
          3'd2: taken = sv[0];  3'd3: taken = !sv[0];
          3'd4: taken = sv[3];  3'd5: taken = !sv[3];
          3'd6: taken = sv[4];  default: taken = !sv[4];
        endcase
        if (taken) exp_npc = pc + 10'd1 + 10'($signed(inst[7:0]));
        if (taken) n_taken++; else n_not++;
      end
      // expected destination and address
      f = inst[7:0];
      case (t.dest)
        1: exp_dest = inst[9] ? DST_MEM : DST_WREG;
        2: exp_dest = DST_MEM;
        3: exp_dest = DST_WREG;
        4: exp_dest = DST_BSR;
        default: exp_dest = DST_NONE;
      endcase
      if (t.file_op && inst[8])      begin exp_addr = {bv[3:0], f}; n_bank++; end
      else if (t.file_op && f >= 8'h80) exp_addr = {4'hF, f};
      else                           exp_addr = {4'h0, f};

      pc_t = pc; pc_f = ~pc; inst_t = inst; inst_f = ~inst;
      if (prev_writes) begin
        #3000;
        expect_eq(|(ctrl_t_o[CTRL_W-1 -: 4] | ctrl_f_o[CTRL_W-1 -: 4]), 0, "control held by the stall");
        expect_eq(stalled, 1, "stalled flag");
        if (inst[15:11] == 5'b11100) expect_eq(|(npc_t | npc_f), 0, "branch waits for the stall");
        n_stall++;
        if (ack_final) begin   // the high ack belongs to an older instruction
          n_stale++;
          ack_final = 0; #100;
        end
        ack_final = 1;
      end
      #3000;
      ct = ctrl_t_o; cf = ctrl_f_o;
      expect_eq((ctrl_t_o ^ ctrl_f_o) == '1, 1, $sformatf("control complete %h", inst));
      expect_eq(npc_t, exp_npc, $sformatf("next PC %h pc=%h st=%h", inst, pc, sv));
      expect_eq(npc_f, 10'(~exp_npc), "next PC f rails");
      expect_eq(ct.dest, exp_dest, $sformatf("destination %h", inst));
      expect_eq(ct.st_mask, t.flags, $sformatf("flag mask %h", inst));
      if (t.file_op || t.dest == 3) expect_eq(ct.addr, exp_addr, $sformatf("address %h", inst));
      if (!prev_writes) expect_eq(stalled, 0, "no stall after a non-writer");
      if (prev_writes) ack_final = 0;   // an older, stale ack stays high
      #100;
      pc_t = 0; pc_f = 0; inst_t = 0; inst_f = 0;
      #3000;
      expect_eq(|{ctrl_t_o, ctrl_f_o, npc_t, npc_f, st_rd_t, st_rd_f, bsr_rd_t, bsr_rd_f}, 0, "NULL");
      prev_writes = (exp_dest != DST_NONE) || (t.flags != 0);
      // WB finishes non-writers at once, and its ack_final may still be high
      // when the next instruction arrives in ID
      if (!prev_writes) begin
        if (ack_final) begin ack_final = 0; #100; end
        ack_final = 1;
        if ($urandom_range(0, 1) == 0) begin #100 ack_final = 0; #100; end
      end
    end
    checks++;
    if (n_stale == 0 || n_stall == 0 || n_taken == 0 || n_not == 0 || n_bank == 0) begin
      failures++; $display("FAIL coverage stale=%0d stall=%0d taken=%0d not=%0d bank=%0d", n_stale, n_stall, n_taken, n_not, n_bank);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
