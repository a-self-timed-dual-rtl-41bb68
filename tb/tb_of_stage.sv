// tb_of_stage: OF in front of real dual-rail WREG and STATUS registers and a
// read adapter with a behavioural data memory. For random control words it
// checks the operand bundle against values computed here (memory or literal
// for source1, WREG or imm2 for source2, swap, complement, carry-in constant
// or STATUS.C), that a storage is read exactly when the word asks for it, that
// the operands stay NULL while the control word is incomplete, and that all
// read requests and operands return to NULL.
`timescale 1ps/1ps
module tb_of_stage;
  import apic_pkg::*;
  logic rst;
  logic [CTRL_W-1:0] c_t, c_f;
  logic wreg_rd_t, wreg_rd_f, st_rd_t, st_rd_f, mem_read, wreg_read;
  logic [0:0][7:0] wreg_t, wreg_f, st_t, st_f;
  logic [DADDR_W-1:0] maddr_t, maddr_f, mem_addr;
  logic [7:0] mdata_t, mdata_f, mem_data;
  logic [OPND_W-1:0] o_t, o_f;
  logic [7:0] wdin_t, wdin_f, wack, wq, sdin_t, sdin_f, sack, sq;
  logic [7:0] mem [4096];
  int checks = 0, failures = 0;

  of_stage dut (.rst, .c_t, .c_f, .wreg_rd_t, .wreg_rd_f, .wreg_t(wreg_t[0]), .wreg_f(wreg_f[0]),
    .st_rd_t, .st_rd_f, .st_t(st_t[0]), .st_f(st_f[0]), .maddr_t, .maddr_f, .mdata_t, .mdata_f,
    .o_t, .o_f, .mem_read, .wreg_read);
  dr_register #(.W(8), .NR(1)) u_w (.rst, .din_t(wdin_t), .din_f(wdin_f), .ack(wack),
    .rd_t(wreg_rd_t), .rd_f(wreg_rd_f), .dout_t(wreg_t), .dout_f(wreg_f), .q(wq));
  dr_register #(.W(8), .NR(1)) u_s (.rst, .din_t(sdin_t), .din_f(sdin_f), .ack(sack),
    .rd_t(st_rd_t), .rd_f(st_rd_f), .dout_t(st_t), .dout_f(st_f), .q(sq));
  mem_adapter #(.AW(DADDR_W), .DW(8), .DELAY(300)) u_rd (.rst, .addr_t(maddr_t), .addr_f(maddr_f),
    .mem_addr, .mem_data, .data_t(mdata_t), .data_f(mdata_f));
  assign mem_data = mem[mem_addr];

  task automatic expect_eq(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  initial begin
    #100_000_000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int seen_mem = 0, seen_w = 0, seen_c = 0;
    for (int i = 0; i < 4096; i++) mem[i] = 8'($urandom);
    rst = 1; c_t = 0; c_f = 0; wdin_t = 0; wdin_f = 0; sdin_t = 0; sdin_f = 0; #10 rst = 0;
    for (int n = 0; n < 1000; n++) begin
      ctrl_t c;
      opnd_t ot, of;
      logic [7:0] wv, sv, s1, s2, a, b;
      logic ci;
      // new register contents
      wv = 8'($urandom); sv = 8'($urandom);
      wdin_t = wv; wdin_f = ~wv; sdin_t = sv; sdin_f = ~sv;
      #10 wdin_t = 0; wdin_f = 0; sdin_t = 0; sdin_f = 0;
      #10;
      c = ctrl_t'({$urandom, $urandom});
      c.cin = cin_e'($urandom_range(0, 2));
      s1 = c.rd_mem ? mem[c.addr] : c.addr[7:0];
      s2 = c.rd_wreg ? wv : c.imm2;
      a = c.swap ? s2 : s1;
      b = c.swap ? s1 : s2;
      if (c.comp2) b = ~b;
      ci = (c.cin == CIN_C) ? sv[ST_C] : c.cin[0];
      c_t = c; c_f = ~c;
      c_t[CTRL_W-1] = 0; c_f[CTRL_W-1] = 0;   // rd_mem still NULL
      #600;
      ot = o_t; of = o_f;
      expect_eq(c.swap ? {ot.s2, of.s2} : {ot.s1, of.s1}, 0, "source1 waits for the select");
      c_t[CTRL_W-1] = c.rd_mem; c_f[CTRL_W-1] = ~c.rd_mem;
      #600;
      ot = o_t; of = o_f;
      expect_eq({ot.s1, ot.s2, 7'b0, ot.cin}, {a, b, 7'b0, ci}, "operands");
      expect_eq({of.s1, of.s2, 7'b0, of.cin}, {8'(~a), 8'(~b), 7'b0, ~ci}, "operand f rails");
      expect_eq({ot.x.fn, ot.x.dest, ot.x.st_mask, ot.x.addr}, {c.fn, c.dest, c.st_mask, c.addr}, "forwarded control");
      expect_eq({mem_read, wreg_read, st_rd_t}, {c.rd_mem, c.rd_wreg, c.cin == CIN_C}, "storage reads");
      seen_mem += mem_read; seen_w += wreg_read; seen_c += st_rd_t;
      c_t = 0; c_f = 0;
      #600;
      expect_eq({o_t, o_f} == 0, 1, "operands NULL");
      expect_eq({mem_read, wreg_read, st_rd_t, maddr_t | maddr_f}, 0, "reads NULL");
    end
    checks++;
    if (seen_mem == 0 || seen_w == 0 || seen_c == 0) begin failures++; $display("FAIL path never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
