// if_stage: instruction fetch.
//
// The Read signal is the inverse of ID's acknowledge: while ID is empty, IF
// reads the PC register (dual-rail read port), the read adapter looks up the
// instruction, and IF presents {PC, instruction} as one dual-rail bundle. When
// ID acknowledges, Read falls, the PC read returns NULL and so does the
// instruction, which lets ID write the next PC into the PC register before the
// following fetch.
//
// The fetch through a read adapter, with Read taken from ID's acknowledge,
// follows the thesis; the bundling of PC with the instruction is this design's
// choice.
`timescale 1ps/1ps
module if_stage
  import apic_pkg::*;
#(
  parameter int unsigned IMEM_DELAY = 400
) (
  input  logic              rst,
  input  logic              id_ack,
  output logic              pc_rd_t, pc_rd_f,
  input  logic [PC_W-1:0]   pc_t, pc_f,
  output logic [PC_W-1:0]   imem_addr,
  input  logic [INST_W-1:0] imem_data,
  output logic [PC_W-1:0]   out_pc_t, out_pc_f,
  output logic [INST_W-1:0] out_inst_t, out_inst_f
);
  assign pc_rd_t = ~id_ack & ~rst;
  assign pc_rd_f = 1'b0;

  mem_adapter #(.AW(PC_W), .DW(INST_W), .DELAY(IMEM_DELAY)) u_imemadp (
    .rst, .addr_t(pc_t), .addr_f(pc_f), .mem_addr(imem_addr), .mem_data(imem_data),
    .data_t(out_inst_t), .data_f(out_inst_f)
  );

  assign out_pc_t = pc_t;
  assign out_pc_f = pc_f;
endmodule
