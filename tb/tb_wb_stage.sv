// tb_wb_stage: WB in front of real dual-rail WREG, BSR and STATUS registers
// and a memory acknowledge that answers after a random delay. For random
// result bundles it checks that nothing is written before the bundle is
// complete, that the addressed destination (and only it) changes, that only
// the masked STATUS flags change, that ack_final waits for the memory
// acknowledge, and that ack_final falls after the bundle returns to NULL.
`timescale 1ps/1ps
module tb_wb_stage;
  import apic_pkg::*;
  logic rst, mack, ack_final;
  logic [RES_W-1:0] i_t, i_f;
  logic [7:0] wreg_din_t, wreg_din_f, wreg_ack, bsr_din_t, bsr_din_f, bsr_ack;
  logic [7:0] st_din_t, st_din_f, st_ack, mdata_t, mdata_f;
  logic [DADDR_W-1:0] maddr_t, maddr_f;
  logic [7:0] wreg_q, bsr_q, st_q;
  logic [0:0][7:0] unused_t [3], unused_f [3];
  logic mem_wr_seen;
  logic [DADDR_W-1:0] mem_wr_addr;
  logic [7:0] mem_wr_data;
  int checks = 0, failures = 0;

  wb_stage dut (.*);
  dr_register #(.W(8), .NR(1)) u_w (.rst, .din_t(wreg_din_t), .din_f(wreg_din_f), .ack(wreg_ack),
    .rd_t(1'b0), .rd_f(1'b0), .dout_t(unused_t[0]), .dout_f(unused_f[0]), .q(wreg_q));
  dr_register #(.W(8), .NR(1)) u_b (.rst, .din_t(bsr_din_t), .din_f(bsr_din_f), .ack(bsr_ack),
    .rd_t(1'b0), .rd_f(1'b0), .dout_t(unused_t[1]), .dout_f(unused_f[1]), .q(bsr_q));
  dr_register #(.W(8), .NR(1)) u_s (.rst, .din_t(st_din_t), .din_f(st_din_f), .ack(st_ack),
    .rd_t(1'b0), .rd_f(1'b0), .dout_t(unused_t[2]), .dout_f(unused_f[2]), .q(st_q));

  // memory write acknowledge: rises a random time after address and data are
  // complete, falls when they return to NULL
  int mdelay;
  always @(maddr_t, maddr_f, mdata_t, mdata_f) begin
    if (&(maddr_t | maddr_f) && &(mdata_t | mdata_f)) begin
      #(mdelay);
      if (&(maddr_t | maddr_f) && &(mdata_t | mdata_f)) begin
        mem_wr_seen = 1; mem_wr_addr = maddr_t; mem_wr_data = mdata_t; mack = 1;
      end
    end else if (~|(maddr_t | maddr_f | mdata_t | mdata_f)) mack = 0;
  end

  task automatic expect_eq(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  initial begin
    #100_000_000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [7:0] w, b, s;
    rst = 1; i_t = 0; i_f = 0; mack = 0; mdelay = 50; mem_wr_seen = 0; #10 rst = 0;
    #10;
    w = 0; b = 0; s = 0;
    expect_eq({wreg_q, bsr_q, st_q}, 0, "reset");
    for (int n = 0; n < 1000; n++) begin
      res_t r;
      r.dest = dest_e'($urandom); r.st_mask = 5'($urandom); r.addr = 12'($urandom);
      r.result = 8'($urandom); r.flags = 5'($urandom);
      mdelay = $urandom_range(20, 400);
      mem_wr_seen = 0;
      i_t = r; i_f = ~r;
      i_t[3] = 0; i_f[3] = 0;            // one flag bit still NULL
      #500;
      expect_eq({wreg_q, bsr_q, st_q, 7'b0, ack_final}, {w, b, s, 8'b0}, "no write before complete");
      i_t[3] = r.flags[3]; i_f[3] = ~r.flags[3];
      if (r.dest == DST_MEM) begin
        #(mdelay - 10);
        expect_eq(ack_final, 0, "ack_final waits for memory");
      end
      #500;
      case (r.dest)
        DST_WREG: w = r.result;
        DST_BSR:  b = {4'h0, r.result[3:0]};
        default: ;
      endcase
      s = (s & ~{3'b0, r.st_mask}) | {3'b0, r.st_mask & r.flags};
      expect_eq(ack_final, 1, "ack_final");
      expect_eq(wreg_q, w, "WREG");
      expect_eq(bsr_q, b, "BSR");
      expect_eq(st_q, s, "STATUS");
      expect_eq(mem_wr_seen, r.dest == DST_MEM, "memory write only for DST_MEM");
      if (r.dest == DST_MEM) expect_eq({mem_wr_addr, mem_wr_data}, {r.addr, r.result}, "memory write");
      i_t = 0; i_f = 0;
      #500;
      expect_eq(ack_final, 0, "ack_final after NULL");
      expect_eq({wreg_ack, bsr_ack, st_ack, 7'b0, mack}, 0, "acks after NULL");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
