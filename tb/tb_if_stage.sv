// tb_if_stage: IF with a real dual-rail PC register and a behavioural
// instruction memory. For random PC values written into the register it
// checks that IF reads the PC while ID has not acknowledged, presents the PC
// and the word at that address one memory delay after the PC is complete,
// not earlier, and that acknowledging from ID returns the bundle to NULL.
`timescale 1ps/1ps
module tb_if_stage;
  import apic_pkg::*;
  localparam int D = 500;
  logic rst, id_ack, pc_rd_t, pc_rd_f;
  logic [0:0][PC_W-1:0] pc_t, pc_f;
  logic [PC_W-1:0] imem_addr, out_pc_t, out_pc_f, din_t, din_f, pack, pq;
  logic [INST_W-1:0] imem_data, out_inst_t, out_inst_f;
  logic [INST_W-1:0] mem [2**PC_W];
  int checks = 0, failures = 0;

  if_stage #(.IMEM_DELAY(D)) dut (.rst, .id_ack, .pc_rd_t, .pc_rd_f, .pc_t(pc_t[0]), .pc_f(pc_f[0]),
    .imem_addr, .imem_data, .out_pc_t, .out_pc_f, .out_inst_t, .out_inst_f);
  dr_register #(.W(PC_W), .NR(1)) u_pc (.rst, .din_t, .din_f, .ack(pack),
    .rd_t(pc_rd_t), .rd_f(pc_rd_f), .dout_t(pc_t), .dout_f(pc_f), .q(pq));
  assign imem_data = mem[imem_addr];

  task automatic expect_eq(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  initial begin
    #100_000_000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 2**PC_W; i++) mem[i] = INST_W'($urandom);
    rst = 1; id_ack = 1; din_t = 0; din_f = 0;
    #(2*D) rst = 0;   // reset lasts longer than the adapter's delay line
    for (int n = 0; n < 300; n++) begin
      logic [PC_W-1:0] pc;
      pc = PC_W'($urandom);
      // ID writes the next PC while it still acknowledges
      din_t = pc; din_f = ~pc; #10;
      din_t = 0; din_f = 0; #10;
      expect_eq({pc_rd_t, out_pc_t | out_pc_f}, 0, "no read while ID acknowledges");
      id_ack = 0;
      #(D - 5);
      expect_eq(pc_rd_t, 1, "PC read");
      expect_eq({out_pc_t, out_pc_f}, {pc, PC_W'(~pc)}, "PC out");
      expect_eq(|(out_inst_t | out_inst_f), 0, "instruction before the memory delay");
      #10;
      expect_eq({out_inst_t, out_inst_f}, {mem[pc], INST_W'(~mem[pc])}, "instruction");
      id_ack = 1;
      #10;
      expect_eq(|{out_pc_t, out_pc_f, out_inst_t, out_inst_f}, 0, "NULL after acknowledge");
      #(D);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
