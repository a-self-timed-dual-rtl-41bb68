// id_decode: single-rail decode of one PIC18 instruction word into the APIC18S
// control word (the "control signal generator & address mapping" of ID).
//
// Pure combinational logic; id_stage wraps it in dual-rail completion logic.
// Address mapping: with a = 1 the physical address is {BSR[3:0], f}; with a = 0
// the access bank is used, f < 80h maps into bank 0 and f >= 80h into bank 15.
// For literal instructions the 8-bit literal travels in the address field and
// reaches EXE as source1. Encodings are those of the PIC18 instruction table.
// Instructions outside the supported set decode as NOP (no write).
//
// The address mapping follows the thesis; the encodings are the standard PIC18
// ones, and the control word layout is this design's own.
`timescale 1ps/1ps
module id_decode
  import apic_pkg::*;
(
  input  logic [INST_W-1:0] inst,
  input  logic [3:0]        bsr,
  output logic              needs_bank,  // uses f with a = 1: BSR must be read
  output ctrl_t             ctrl
);
  logic       d, a;
  logic [7:0] f, bitmask;
  logic       file_op;   // operand is a file register

  assign d       = inst[9];
  assign a       = inst[8];
  assign f       = inst[7:0];
  assign bitmask = 8'b1 << inst[11:9];

  always_comb begin
    ctrl         = '0;
    ctrl.imm2    = '0;
    ctrl.cin     = CIN_0;
    ctrl.fn      = FN_PASS1;
    ctrl.dest    = DST_NONE;
    file_op      = 1'b0;

    unique casez (inst[15:8])
      // ---- byte-oriented file register operations ----
      8'b0010_01??: begin  // ADDWF
        file_op = 1; ctrl.rd_mem = 1; ctrl.rd_wreg = 1; ctrl.fn = FN_ADD;
        ctrl.st_mask = 5'b11111; ctrl.dest = d ? DST_MEM : DST_WREG;
      end
      8'b0010_00??: begin  // ADDWFC
        file_op = 1; ctrl.rd_mem = 1; ctrl.rd_wreg = 1; ctrl.fn = FN_ADD; ctrl.cin = CIN_C;
        ctrl.st_mask = 5'b11111; ctrl.dest = d ? DST_MEM : DST_WREG;
      end
      8'b0001_01??: begin  // ANDWF
        file_op = 1; ctrl.rd_mem = 1; ctrl.rd_wreg = 1; ctrl.fn = FN_AND;
        ctrl.st_mask = 5'b10100; ctrl.dest = d ? DST_MEM : DST_WREG;
      end
      8'b0001_00??: begin  // IORWF
        file_op = 1; ctrl.rd_mem = 1; ctrl.rd_wreg = 1; ctrl.fn = FN_IOR;
        ctrl.st_mask = 5'b10100; ctrl.dest = d ? DST_MEM : DST_WREG;
      end
      8'b0001_10??: begin  // XORWF
        file_op = 1; ctrl.rd_mem = 1; ctrl.rd_wreg = 1; ctrl.fn = FN_XOR;
        ctrl.st_mask = 5'b10100; ctrl.dest = d ? DST_MEM : DST_WREG;
      end
      8'b0001_11??: begin  // COMF
        file_op = 1; ctrl.rd_mem = 1; ctrl.imm2 = 8'hFF; ctrl.fn = FN_XOR;
        ctrl.st_mask = 5'b10100; ctrl.dest = d ? DST_MEM : DST_WREG;
      end
      8'b0000_01??: begin  // DECF
        file_op = 1; ctrl.rd_mem = 1; ctrl.imm2 = 8'hFF; ctrl.fn = FN_ADD;
        ctrl.st_mask = 5'b11111; ctrl.dest = d ? DST_MEM : DST_WREG;
      end
      8'b0010_10??: begin  // INCF
        file_op = 1; ctrl.rd_mem = 1; ctrl.imm2 = 8'h01; ctrl.fn = FN_ADD;
        ctrl.st_mask = 5'b11111; ctrl.dest = d ? DST_MEM : DST_WREG;
      end
      8'b0101_00??: begin  // MOVF
        file_op = 1; ctrl.rd_mem = 1; ctrl.fn = FN_PASS1;
        ctrl.st_mask = 5'b10100; ctrl.dest = d ? DST_MEM : DST_WREG;
      end
      8'b0011_01??: begin  // RLCF
        file_op = 1; ctrl.rd_mem = 1; ctrl.fn = FN_RLC; ctrl.cin = CIN_C;
        ctrl.st_mask = 5'b10101; ctrl.dest = d ? DST_MEM : DST_WREG;
      end
      8'b0100_01??: begin  // RLNCF
        file_op = 1; ctrl.rd_mem = 1; ctrl.fn = FN_RLNC;
        ctrl.st_mask = 5'b10100; ctrl.dest = d ? DST_MEM : DST_WREG;
      end
      8'b0011_00??: begin  // RRCF
        file_op = 1; ctrl.rd_mem = 1; ctrl.fn = FN_RRC; ctrl.cin = CIN_C;
        ctrl.st_mask = 5'b10101; ctrl.dest = d ? DST_MEM : DST_WREG;
      end
      8'b0100_00??: begin  // RRNCF
        file_op = 1; ctrl.rd_mem = 1; ctrl.fn = FN_RRNC;
        ctrl.st_mask = 5'b10100; ctrl.dest = d ? DST_MEM : DST_WREG;
      end
      8'b0011_10??: begin  // SWAPF
        file_op = 1; ctrl.rd_mem = 1; ctrl.fn = FN_SWAP;
        ctrl.dest = d ? DST_MEM : DST_WREG;
      end
      8'b0101_01??: begin  // SUBFWB: W - f - !C = W + ~f + C
        file_op = 1; ctrl.rd_mem = 1; ctrl.rd_wreg = 1; ctrl.swap = 1; ctrl.comp2 = 1;
        ctrl.fn = FN_ADD; ctrl.cin = CIN_C;
        ctrl.st_mask = 5'b11111; ctrl.dest = d ? DST_MEM : DST_WREG;
      end
      8'b0101_11??: begin  // SUBWF: f + ~W + 1
        file_op = 1; ctrl.rd_mem = 1; ctrl.rd_wreg = 1; ctrl.comp2 = 1;
        ctrl.fn = FN_ADD; ctrl.cin = CIN_1;
        ctrl.st_mask = 5'b11111; ctrl.dest = d ? DST_MEM : DST_WREG;
      end
      8'b0101_10??: begin  // SUBWFB: f + ~W + C
        file_op = 1; ctrl.rd_mem = 1; ctrl.rd_wreg = 1; ctrl.comp2 = 1;
        ctrl.fn = FN_ADD; ctrl.cin = CIN_C;
        ctrl.st_mask = 5'b11111; ctrl.dest = d ? DST_MEM : DST_WREG;
      end
      8'b0110_101?: begin  // CLRF
        file_op = 1; ctrl.imm2 = 8'h00; ctrl.fn = FN_PASS2;
        ctrl.st_mask = 5'b00100; ctrl.dest = DST_MEM;
      end
      8'b0110_100?: begin  // SETF
        file_op = 1; ctrl.imm2 = 8'hFF; ctrl.fn = FN_PASS2; ctrl.dest = DST_MEM;
      end
      8'b0110_111?: begin  // MOVWF
        file_op = 1; ctrl.rd_wreg = 1; ctrl.fn = FN_PASS2; ctrl.dest = DST_MEM;
      end
      8'b0110_110?: begin  // NEGF: 0 + ~f + 1
        file_op = 1; ctrl.rd_mem = 1; ctrl.imm2 = 8'h00; ctrl.swap = 1; ctrl.comp2 = 1;
        ctrl.fn = FN_ADD; ctrl.cin = CIN_1; ctrl.st_mask = 5'b11111; ctrl.dest = DST_MEM;
      end
      // ---- bit-oriented file register operations ----
      8'b1001_????: begin  // BCF
        file_op = 1; ctrl.rd_mem = 1; ctrl.imm2 = ~bitmask; ctrl.fn = FN_AND; ctrl.dest = DST_MEM;
      end
      8'b1000_????: begin  // BSF
        file_op = 1; ctrl.rd_mem = 1; ctrl.imm2 = bitmask; ctrl.fn = FN_IOR; ctrl.dest = DST_MEM;
      end
      8'b0111_????: begin  // BTG
        file_op = 1; ctrl.rd_mem = 1; ctrl.imm2 = bitmask; ctrl.fn = FN_XOR; ctrl.dest = DST_MEM;
      end
      // ---- literal operations ----
      8'b0000_1111: begin  // ADDLW
        ctrl.rd_wreg = 1; ctrl.fn = FN_ADD; ctrl.st_mask = 5'b11111; ctrl.dest = DST_WREG;
      end
      8'b0000_1011: begin  // ANDLW
        ctrl.rd_wreg = 1; ctrl.fn = FN_AND; ctrl.st_mask = 5'b10100; ctrl.dest = DST_WREG;
      end
      8'b0000_1001: begin  // IORLW
        ctrl.rd_wreg = 1; ctrl.fn = FN_IOR; ctrl.st_mask = 5'b10100; ctrl.dest = DST_WREG;
      end
      8'b0000_1010: begin  // XORLW
        ctrl.rd_wreg = 1; ctrl.fn = FN_XOR; ctrl.st_mask = 5'b10100; ctrl.dest = DST_WREG;
      end
      8'b0000_1110: begin  // MOVLW
        ctrl.fn = FN_PASS1; ctrl.dest = DST_WREG;
      end
      8'b0000_1000: begin  // SUBLW: k + ~W + 1
        ctrl.rd_wreg = 1; ctrl.comp2 = 1; ctrl.fn = FN_ADD; ctrl.cin = CIN_1;
        ctrl.st_mask = 5'b11111; ctrl.dest = DST_WREG;
      end
      8'b0000_0001: begin  // MOVLB (literal in the low nibble)
        if (inst[7:4] == 4'h0) begin
          ctrl.fn = FN_PASS1; ctrl.dest = DST_BSR;
        end
      end
      default: ;  // branches, NOP and unsupported words: no write
    endcase

    needs_bank = file_op & a;
    if (file_op) begin
      if (a)                      ctrl.addr = {bsr, f};
      else if (f >= ACCESS_SPLIT) ctrl.addr = {4'hF, f};
      else                        ctrl.addr = {4'h0, f};
    end else begin
      ctrl.addr = {4'h0, f};
    end
  end
endmodule
