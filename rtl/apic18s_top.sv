// apic18s_top: APIC18S, a self-timed dual-rail pipelined PIC18-compatible core
// with its instruction and data memories.
//
// Five stages, IF, ID, OF, EXE and WB, form a 4-phase dual-rail Muller
// pipeline: each stage boundary is a dr_pipe_latch whose completion signal
// acknowledges the stage before it, and valid tokens alternate with NULL
// spacers. There is no clock. The PC register sits in the loop IF -> ID -> PC:
// IF reads it while ID is empty, ID writes the next PC into it, and ID only
// acknowledges IF once that write has completed. WREG, STATUS and BSR are
// dual-rail registers read by ID/OF and written by WB; the data memory is read
// by OF and written by WB through single-rail adapters. A dependent
// instruction is held in ID by the stall controller until WB raises
// ack_final for the instruction before it.
//
// The logic itself is zero-delay. Each stage's output passes through a
// behavioural delay_line carrying that stage's latency (defaults: the
// worst-case stage delays of a 0.13 um implementation, in ps), and the memory
// adapters carry matched delays. The stall policy is correct only if the
// delay from IF to the stall controller is smaller than the delay from OF to
// WB (IMEM_DELAY + D_IF < D_OF + D_EXE + D_WB); otherwise a stalled
// instruction can wait for an ack_final that has already come and gone.
//
// Interface: rst is active high and asynchronous. It must rise (the few
// flip-flops in ID are reset on its edge) and stay high longer than the
// slowest delay (D_EXE), so that every delay line has settled to NULL; the
// core then starts fetching at PC 0 when rst falls. The program is written
// beforehand through the load port (load_clk, load_we, load_addr,
// load_data). pc_q, wreg_q, status_q and bsr_q show the register contents;
// ack_final pulses once per finished instruction; id_stalled, of_mem_read,
// of_wreg_read, exe_adder and dmem_we show which mechanisms are active.
//
// From the thesis: the five stages, the stall controller and its timing
// condition, DeMUX-MERGE bypassing in OF and EXE, the dual-rail registers and
// the memory adapters. This design's own: the instruction encodings (standard
// PIC18), the delay values of the memories, the load port, and the way ID
// qualifies ack_final (see id_stage).
//
// The combinational loops that tools report here are the handshake rings of
// the self-timed pipeline (request forward, acknowledge back through
// C-elements), including the ring through the memory adapters and the
// asynchronous memory reads; they are the design, not an error.
`timescale 1ps/1ps
module apic18s_top
  import apic_pkg::*;
#(
  parameter int unsigned IMEM_DELAY = 1000,
  parameter int unsigned DMEM_DELAY = 1000,
  parameter int unsigned D_IF       = 550,
  parameter int unsigned D_ID       = 3378,
  parameter int unsigned D_OF       = 5382,
  parameter int unsigned D_EXE      = 25497,
  parameter int unsigned D_WB       = 3086
) (
  input  logic              rst,
  // instruction memory load port
  input  logic              load_clk,
  input  logic              load_we,
  input  logic [PC_W-1:0]   load_addr,
  input  logic [INST_W-1:0] load_data,
  // architectural state, for observation
  output logic [PC_W-1:0]   pc_q,
  output logic [7:0]        wreg_q,
  output logic [7:0]        status_q,
  output logic [7:0]        bsr_q,
  // events
  output logic              ack_final,   // an instruction finished write-back
  output logic              id_stalled,  // an instruction waits in the stall controller
  output logic              of_mem_read, // OF is reading data memory
  output logic              of_wreg_read,// OF is reading WREG
  output logic              exe_adder,   // EXE is using the adder path
  output logic              dmem_we      // data memory write strobe
);
  localparam int unsigned IFW = PC_W + INST_W;

  // ---------------------------------------------------------------- memories
  logic [PC_W-1:0]    imem_addr;
  logic [INST_W-1:0]  imem_data;
  imem #(.AW(PC_W), .DW(INST_W)) u_imem (
    .addr(imem_addr), .rdata(imem_data),
    .load_clk, .load_we, .load_addr, .load_data
  );

  logic [DADDR_W-1:0] dm_raddr, dm_waddr;
  logic [7:0]         dm_rdata, dm_wdata;
  dmem #(.AW(DADDR_W), .DW(8)) u_dmem (
    .raddr(dm_raddr), .rdata(dm_rdata), .we(dmem_we), .waddr(dm_waddr), .wdata(dm_wdata)
  );

  // ---------------------------------------------------------------- registers
  logic [PC_W-1:0] npc_t, npc_f, pc_ack, pcr_t, pcr_f;
  logic            pc_rd_t, pc_rd_f;
  dr_register #(.W(PC_W), .NR(1)) u_pc (
    .rst, .din_t(npc_t), .din_f(npc_f), .ack(pc_ack),
    .rd_t(pc_rd_t), .rd_f(pc_rd_f), .dout_t(pcr_t), .dout_f(pcr_f), .q(pc_q)
  );

  logic [7:0] wreg_din_t, wreg_din_f, wreg_ack, wreg_t, wreg_f;
  logic       wreg_rd_t, wreg_rd_f;
  dr_register #(.W(8), .NR(1)) u_wreg (
    .rst, .din_t(wreg_din_t), .din_f(wreg_din_f), .ack(wreg_ack),
    .rd_t(wreg_rd_t), .rd_f(wreg_rd_f), .dout_t(wreg_t), .dout_f(wreg_f), .q(wreg_q)
  );

  // STATUS: read port 0 for the branch controller (ID), port 1 for the carry (OF)
  logic [7:0]      st_din_t, st_din_f, st_ack;
  logic [1:0]      st_rd_t, st_rd_f;
  logic [1:0][7:0] st_t, st_f;
  dr_register #(.W(8), .NR(2)) u_status (
    .rst, .din_t(st_din_t), .din_f(st_din_f), .ack(st_ack),
    .rd_t(st_rd_t), .rd_f(st_rd_f), .dout_t(st_t), .dout_f(st_f), .q(status_q)
  );

  logic [7:0] bsr_din_t, bsr_din_f, bsr_ack, bsr_t, bsr_f;
  logic       bsr_rd_t, bsr_rd_f;
  dr_register #(.W(8), .NR(1)) u_bsr (
    .rst, .din_t(bsr_din_t), .din_f(bsr_din_f), .ack(bsr_ack),
    .rd_t(bsr_rd_t), .rd_f(bsr_rd_f), .dout_t(bsr_t), .dout_f(bsr_f), .q(bsr_q)
  );

  // --------------------------------------------------------------------- IF
  logic              id_ack;
  logic [PC_W-1:0]   if_pc_t, if_pc_f;
  logic [INST_W-1:0] if_inst_t, if_inst_f;
  if_stage #(.IMEM_DELAY(IMEM_DELAY)) u_if (
    .rst, .id_ack, .pc_rd_t, .pc_rd_f, .pc_t(pcr_t), .pc_f(pcr_f),
    .imem_addr, .imem_data,
    .out_pc_t(if_pc_t), .out_pc_f(if_pc_f), .out_inst_t(if_inst_t), .out_inst_f(if_inst_f)
  );

  logic [IFW-1:0] ifd_t, ifd_f;
  delay_line #(.W(2*IFW), .DELAY(D_IF)) u_d_if (
    .d({if_pc_t, if_inst_t, if_pc_f, if_inst_f}), .q({ifd_t, ifd_f})
  );

  // --------------------------------------------------------------------- ID
  logic [IFW-1:0] id_in_t, id_in_f;
  logic           id_done, of_done, exe_done, wb_done;
  dr_pipe_latch #(.W(IFW)) u_l_id (
    .rst, .in_t(ifd_t), .in_f(ifd_f), .ack_next(of_done),
    .out_t(id_in_t), .out_f(id_in_f), .done(id_done)
  );

  // ID acknowledges IF once its latch holds the token and the next PC is written
  logic pc_written;
  c_tree #(.N(PC_W)) u_pcw (.rst, .in(pc_ack), .y(pc_written));
  c_tree #(.N(2))    u_idack (.rst, .in({id_done, pc_written}), .y(id_ack));

  logic [CTRL_W-1:0] id_c_t, id_c_f;
  id_stage u_id (
    .rst,
    .pc_t(id_in_t[IFW-1:INST_W]), .pc_f(id_in_f[IFW-1:INST_W]),
    .inst_t(id_in_t[INST_W-1:0]), .inst_f(id_in_f[INST_W-1:0]),
    .ack_final,
    .st_rd_t(st_rd_t[0]), .st_rd_f(st_rd_f[0]), .st_t(st_t[0]), .st_f(st_f[0]),
    .bsr_rd_t, .bsr_rd_f, .bsr_t, .bsr_f,
    .npc_t, .npc_f,
    .ctrl_t_o(id_c_t), .ctrl_f_o(id_c_f),
    .stalled(id_stalled)
  );

  logic [CTRL_W-1:0] idd_t, idd_f;
  delay_line #(.W(2*CTRL_W), .DELAY(D_ID)) u_d_id (.d({id_c_t, id_c_f}), .q({idd_t, idd_f}));

  // --------------------------------------------------------------------- OF
  logic [CTRL_W-1:0] of_in_t, of_in_f;
  dr_pipe_latch #(.W(CTRL_W)) u_l_of (
    .rst, .in_t(idd_t), .in_f(idd_f), .ack_next(exe_done),
    .out_t(of_in_t), .out_f(of_in_f), .done(of_done)
  );

  logic [DADDR_W-1:0] of_maddr_t, of_maddr_f;
  logic [7:0]         of_mdata_t, of_mdata_f;
  logic [OPND_W-1:0]  of_o_t, of_o_f;
  of_stage u_of (
    .rst, .c_t(of_in_t), .c_f(of_in_f),
    .wreg_rd_t, .wreg_rd_f, .wreg_t, .wreg_f,
    .st_rd_t(st_rd_t[1]), .st_rd_f(st_rd_f[1]), .st_t(st_t[1]), .st_f(st_f[1]),
    .maddr_t(of_maddr_t), .maddr_f(of_maddr_f), .mdata_t(of_mdata_t), .mdata_f(of_mdata_f),
    .o_t(of_o_t), .o_f(of_o_f),
    .mem_read(of_mem_read), .wreg_read(of_wreg_read)
  );

  // DMEMAdp, read side
  mem_adapter #(.AW(DADDR_W), .DW(8), .DELAY(DMEM_DELAY)) u_dmemadp_rd (
    .rst, .addr_t(of_maddr_t), .addr_f(of_maddr_f), .mem_addr(dm_raddr),
    .mem_data(dm_rdata), .data_t(of_mdata_t), .data_f(of_mdata_f)
  );

  logic [OPND_W-1:0] ofd_t, ofd_f;
  delay_line #(.W(2*OPND_W), .DELAY(D_OF)) u_d_of (.d({of_o_t, of_o_f}), .q({ofd_t, ofd_f}));

  // -------------------------------------------------------------------- EXE
  logic [OPND_W-1:0] exe_in_t, exe_in_f;
  dr_pipe_latch #(.W(OPND_W)) u_l_exe (
    .rst, .in_t(ofd_t), .in_f(ofd_f), .ack_next(wb_done),
    .out_t(exe_in_t), .out_f(exe_in_f), .done(exe_done)
  );

  logic [RES_W-1:0] exe_o_t, exe_o_f;
  exe_stage u_exe (.rst, .i_t(exe_in_t), .i_f(exe_in_f), .o_t(exe_o_t), .o_f(exe_o_f),
                   .used_adder(exe_adder));

  logic [RES_W-1:0] exed_t, exed_f;
  delay_line #(.W(2*RES_W), .DELAY(D_EXE)) u_d_exe (.d({exe_o_t, exe_o_f}), .q({exed_t, exed_f}));

  // --------------------------------------------------------------------- WB
  logic [RES_W-1:0] wb_in_t, wb_in_f;
  dr_pipe_latch #(.W(RES_W)) u_l_wb (
    .rst, .in_t(exed_t), .in_f(exed_f), .ack_next(ack_final),
    .out_t(wb_in_t), .out_f(wb_in_f), .done(wb_done)
  );

  logic [RES_W-1:0] wbd_t, wbd_f;
  delay_line #(.W(2*RES_W), .DELAY(D_WB)) u_d_wb (.d({wb_in_t, wb_in_f}), .q({wbd_t, wbd_f}));

  logic [DADDR_W-1:0] wb_maddr_t, wb_maddr_f;
  logic [7:0]         wb_mdata_t, wb_mdata_f;
  logic               wb_mack;
  wb_stage u_wb (
    .rst, .i_t(wbd_t), .i_f(wbd_f),
    .wreg_din_t, .wreg_din_f, .wreg_ack,
    .bsr_din_t, .bsr_din_f, .bsr_ack,
    .st_din_t, .st_din_f, .st_ack,
    .maddr_t(wb_maddr_t), .maddr_f(wb_maddr_f), .mdata_t(wb_mdata_t), .mdata_f(wb_mdata_f),
    .mack(wb_mack), .ack_final
  );

  // DMEMAdp, write side
  mem_wr_adapter #(.AW(DADDR_W), .DW(8), .DELAY(DMEM_DELAY)) u_dmemadp_wr (
    .rst, .addr_t(wb_maddr_t), .addr_f(wb_maddr_f), .data_t(wb_mdata_t), .data_f(wb_mdata_f),
    .mem_addr(dm_waddr), .mem_data(dm_wdata), .mem_we(dmem_we), .ack(wb_mack)
  );
endmodule
