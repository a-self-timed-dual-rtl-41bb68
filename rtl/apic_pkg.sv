`timescale 1ps/1ps
// apic_pkg: widths, STATUS bit positions and the control word shared by the
// stages of the APIC18S dual-rail core.
//
// Every dual-rail bundle in the core is carried as two vectors, <name>_t and
// <name>_f: (t,f) = (0,0) is the empty spacer (NULL), (0,1) a valid 0, (1,0) a
// valid 1, (1,1) is never produced. The control word below is the single-rail
// view of the bundle that ID hands to OF; on the wires it travels dual-rail.
//
// The STATUS layout, the access-bank split at 80h and the 16 x 256 byte data
// space follow the thesis and PIC18; the control word's fields and the
// function and destination encodings are this design's own.
package apic_pkg;

  localparam int unsigned PC_W    = 10;  // program counter width (words)
  localparam int unsigned INST_W  = 16;  // instruction width
  localparam int unsigned DADDR_W = 12;  // physical data address (16 banks x 256)
  localparam int unsigned DATA_W  = 8;   // data width
  localparam int unsigned NFLAG   = 5;   // STATUS flags C, DC, Z, OV, N

  // STATUS bit positions (PIC18 layout)
  localparam int unsigned ST_C  = 0;
  localparam int unsigned ST_DC = 1;
  localparam int unsigned ST_Z  = 2;
  localparam int unsigned ST_OV = 3;
  localparam int unsigned ST_N  = 4;

  // Start of the upper half of the access bank (bank 15 SFR segment)
  localparam logic [7:0] ACCESS_SPLIT = 8'h80;

  // Result destination selected by WB
  typedef enum logic [1:0] {
    DST_NONE = 2'd0,
    DST_WREG = 2'd1,
    DST_MEM  = 2'd2,
    DST_BSR  = 2'd3
  } dest_e;

  // EXE function. FN_ADD goes through the dual-rail ripple adder, all others
  // through the logic/rotate path.
  typedef enum logic [3:0] {
    FN_ADD   = 4'd0,
    FN_AND   = 4'd1,
    FN_IOR   = 4'd2,
    FN_XOR   = 4'd3,
    FN_PASS1 = 4'd4,
    FN_PASS2 = 4'd5,
    FN_RLC   = 4'd6,
    FN_RLNC  = 4'd7,
    FN_RRC   = 4'd8,
    FN_RRNC  = 4'd9,
    FN_SWAP  = 4'd10
  } fn_e;

  // Carry-in source for the adder
  typedef enum logic [1:0] {
    CIN_0 = 2'd0,
    CIN_1 = 2'd1,
    CIN_C = 2'd2
  } cin_e;

  // Control word produced by ID for OF (travels dual-rail, 37 bits with addr)
  typedef struct packed {
    logic              rd_mem;   // source1 from data memory, else the address field (literal)
    logic              rd_wreg;  // source2 from WREG, else imm2
    logic              swap;     // exchange source1 and source2 before the complement
    logic              comp2;    // complement source2 (subtraction)
    logic [7:0]        imm2;     // source2 when WREG is not read
    cin_e              cin;      // carry-in source
    fn_e               fn;       // EXE function
    dest_e             dest;     // WB destination
    logic [NFLAG-1:0]  st_mask;  // STATUS flags written by WB
    logic [DADDR_W-1:0] addr;    // physical data address, low byte = literal for literal ops
  } ctrl_t;

  localparam int unsigned CTRL_W = $bits(ctrl_t);

  // Control bundle that OF passes to EXE together with the operands
  typedef struct packed {
    fn_e               fn;
    dest_e             dest;
    logic [NFLAG-1:0]  st_mask;
    logic [DADDR_W-1:0] addr;
  } xctrl_t;

  localparam int unsigned XCTRL_W = $bits(xctrl_t);

  // Operand bundle OF -> EXE
  typedef struct packed {
    xctrl_t            x;
    logic [DATA_W-1:0] s1;
    logic [DATA_W-1:0] s2;
    logic              cin;
  } opnd_t;

  localparam int unsigned OPND_W = $bits(opnd_t);

  // Result bundle EXE -> WB
  typedef struct packed {
    dest_e             dest;
    logic [NFLAG-1:0]  st_mask;
    logic [DADDR_W-1:0] addr;
    logic [DATA_W-1:0] result;
    logic [NFLAG-1:0]  flags;
  } res_t;

  localparam int unsigned RES_W = $bits(res_t);

  // Does an instruction with this control word write any state?
  function automatic logic writes_state(input ctrl_t c);
    return (c.dest != DST_NONE) || (c.st_mask != '0);
  endfunction

endpackage
