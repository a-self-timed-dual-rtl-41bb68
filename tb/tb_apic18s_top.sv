// tb_apic18s_top: end-to-end test of the APIC18S core.
//
// Loads a program into instruction memory, releases reset and follows the core
// with an independent instruction-level model of the supported PIC18 subset.
// Every rising edge of ack_final retires one instruction: the model executes
// the instruction at its own PC and the test compares WREG, STATUS, BSR and the
// data-memory byte the instruction wrote. The program starts with a directed
// part (a counted loop with a taken backward branch, banked addressing,
// not-taken branches, back-to-back NOPs that need no stall) followed by a
// seeded random mix, and ends in a branch-to-self. The test also counts how
// often each mechanism happened: stalls in ID, instructions that passed
// without stall, taken and not-taken conditional branches, BRA, data-memory
// reads and writes, WREG reads, carry reads of STATUS, banked accesses, adder
// and logic paths in EXE; each must occur at least once. It runs with every
// parameter at its default.
`timescale 1ps/1ps
module tb_apic18s_top;
  import apic_pkg::*;

  localparam int unsigned NRAND   = 300;
  localparam int unsigned MAXPROG = 1024;

  logic              rst = 1'b1;
  logic              load_clk = 1'b0;
  logic              load_we = 1'b0;
  logic [PC_W-1:0]   load_addr = '0;
  logic [INST_W-1:0] load_data = '0;
  logic [PC_W-1:0]   pc_q;
  logic [7:0]        wreg_q, status_q, bsr_q;
  logic              ack_final, id_stalled, of_mem_read, of_wreg_read, exe_adder, dmem_we;

  apic18s_top dut (.*);

  int checks = 0, failures = 0;

  // ------------------------------------------------------------ program
  logic [15:0] prog [MAXPROG];
  int          plen = 0;
  int          halt_pc;

  function automatic void emit(logic [15:0] w);
    prog[plen] = w;
    plen++;
  endfunction

  // encoders
  function automatic logic [15:0] byteop(logic [5:0] op, bit d, bit a, logic [7:0] f);
    return {op, d, a, f};
  endfunction
  function automatic logic [15:0] lit(logic [7:0] op, logic [7:0] k);
    return {op, k};
  endfunction

  localparam logic [5:0] OP_ADDWF = 6'b001001, OP_ADDWFC = 6'b001000, OP_ANDWF = 6'b000101,
    OP_IORWF = 6'b000100, OP_XORWF = 6'b000110, OP_COMF = 6'b000111, OP_DECF = 6'b000001,
    OP_INCF = 6'b001010, OP_MOVF = 6'b010100, OP_RLCF = 6'b001101, OP_RLNCF = 6'b010001,
    OP_RRCF = 6'b001100, OP_RRNCF = 6'b010000, OP_SWAPF = 6'b001110, OP_SUBFWB = 6'b010101,
    OP_SUBWF = 6'b010111, OP_SUBWFB = 6'b010110;
  localparam logic [6:0] OP_CLRF = 7'b0110101, OP_SETF = 7'b0110100, OP_MOVWF = 7'b0110111,
    OP_NEGF = 7'b0110110;

  function automatic logic [15:0] rand_inst(int pos);
    int unsigned r = $urandom_range(0, 39);
    logic [7:0] f;
    bit a = $urandom_range(0, 3) == 0;
    bit d = $urandom_range(0, 1) == 1;
    logic [5:0] ops [17] = '{OP_ADDWF, OP_ADDWFC, OP_ANDWF, OP_IORWF, OP_XORWF, OP_COMF,
      OP_DECF, OP_INCF, OP_MOVF, OP_RLCF, OP_RLNCF, OP_RRCF, OP_RRNCF, OP_SWAPF, OP_SUBFWB,
      OP_SUBWF, OP_SUBWFB};
    logic [6:0] ops7 [4] = '{OP_CLRF, OP_SETF, OP_MOVWF, OP_NEGF};
    case ($urandom_range(0, 2))
      0: f = 8'($urandom_range(0, 7));
      1: f = 8'($urandom_range(8'h80, 8'h83));
      default: f = 8'($urandom_range(8'h10, 8'h13));
    endcase
    if (r < 17)      return byteop(ops[r], d, a, f);
    else if (r < 21) return {ops7[r-17], a, f};
    else if (r < 24) return {4'b1000 | 4'(r-21) , 3'($urandom_range(0, 7)), a, f}; // BSF/BCF/BTG
    else if (r < 31) begin
      logic [7:0] lops [7] = '{8'h0F, 8'h0B, 8'h09, 8'h0A, 8'h0E, 8'h08, 8'h0E};
      return lit(lops[r-24], 8'($urandom));
    end
    else if (r < 33) return lit(8'h01, 8'($urandom_range(0, 3)));          // MOVLB
    else if (r < 38) return {5'b11100, 3'($urandom_range(0, 7)), 8'($urandom_range(0, 3))};
    else if (r < 39) return 16'h0000;                                        // NOP
    else             return {5'b11010, 11'($urandom_range(0, 2))};          // BRA forward
  endfunction

  function automatic logic [15:0] fix_bit(logic [15:0] w);
    // map the 4-bit groups 1000/1001/1010 used above to BSF/BCF/BTG
    if (w[15:12] == 4'b1010) return {4'b0111, w[11:0]};
    return w;
  endfunction

  task automatic build_program();
    // directed part
    emit(lit(8'h0E, 8'h05));                 // 0  MOVLW 5
    emit({OP_MOVWF, 1'b0, 8'h10});           // 1  MOVWF 0x10
    emit(lit(8'h0E, 8'h00));                 // 2  MOVLW 0
    emit(byteop(OP_ADDWF, 0, 0, 8'h10));     // 3  ADDWF 0x10,W
    emit(byteop(OP_DECF, 1, 0, 8'h10));      // 4  DECF 0x10,F
    emit(16'hE1FD);                          // 5  BNZ 3
    emit({OP_MOVWF, 1'b0, 8'h20});           // 6  MOVWF 0x20
    emit(lit(8'h01, 8'h02));                 // 7  MOVLB 2
    emit({OP_MOVWF, 1'b1, 8'h30});           // 8  MOVWF 0x30 (bank 2)
    emit(byteop(OP_INCF, 1, 1, 8'h30));      // 9  INCF 0x30,F (bank 2)
    emit(byteop(OP_MOVF, 0, 1, 8'h30));      // 10 MOVF 0x30,W (bank 2)
    emit(16'h0000);                          // 11 NOP
    emit(16'h0000);                          // 12 NOP (no stall after a NOP)
    emit(16'hE001);                          // 13 BZ +1 (not taken)
    emit(16'hE201);                          // 14 BC +1
    emit(16'h0000);                          // 15 NOP
    emit(byteop(OP_ADDWFC, 1, 0, 8'h20));    // 16 ADDWFC 0x20,F
    emit(16'hD000);                          // 17 BRA +0
    // random part
    for (int i = 0; i < NRAND; i++) emit(fix_bit(rand_inst(plen)));
    for (int i = 0; i < 4; i++) emit(16'h0000);
    halt_pc = plen;
    emit(16'hD7FF);                          // BRA -1: branch to self
  endtask

  // ------------------------------------------------------------ model
  logic [7:0]      m_mem [4096];
  logic [7:0]      m_w, m_st, m_bsr;
  int              m_pc;
  logic [11:0]     m_waddr;
  bit              m_wmem;
  int n_taken = 0, n_ntaken = 0, n_bra = 0, n_bank = 0, n_carry = 0;

  function automatic logic [8:0] add9(logic [7:0] x, logic [7:0] y, logic c, input bit set_flags,
                                      ref logic [7:0] st);
    logic [8:0] r;
    logic [4:0] lo;
    r  = {1'b0, x} + {1'b0, y} + 9'(c);
    lo = {1'b0, x[3:0]} + {1'b0, y[3:0]} + 5'(c);
    if (set_flags) begin
      st[ST_C]  = r[8];
      st[ST_DC] = lo[4];
      st[ST_OV] = (x[7] == y[7]) && (r[7] != x[7]);
    end
    return r;
  endfunction

  task automatic model_step();
    logic [15:0] w;
    bit d, a;
    logic [7:0] f, fv, r, k, mask;
    logic [11:0] addr;
    bit wr_w, wr_f, zn;
    logic [8:0] s;
    int nxt;
    w = prog[m_pc];
    d = w[9]; a = w[8]; f = w[7:0]; k = w[7:0];
    addr = a ? {m_bsr[3:0], f} : (f >= 8'h80 ? {4'hF, f} : {4'h0, f});
    fv = m_mem[addr];
    mask = 8'(1) << w[11:9];
    wr_w = 0; wr_f = 0; zn = 0; r = 0;
    nxt = m_pc + 1;
    m_wmem = 0;
    casez (w[15:8])
      8'b0010_01??: begin s = add9(fv, m_w, 0, 1, m_st); r = s[7:0]; zn = 1; end
      8'b0010_00??: begin n_carry++; s = add9(fv, m_w, m_st[ST_C], 1, m_st); r = s[7:0]; zn = 1; end
      8'b0001_01??: begin r = fv & m_w; zn = 1; end
      8'b0001_00??: begin r = fv | m_w; zn = 1; end
      8'b0001_10??: begin r = fv ^ m_w; zn = 1; end
      8'b0001_11??: begin r = ~fv; zn = 1; end
      8'b0000_01??: begin s = add9(fv, 8'hFF, 0, 1, m_st); r = s[7:0]; zn = 1; end
      8'b0010_10??: begin s = add9(fv, 8'h01, 0, 1, m_st); r = s[7:0]; zn = 1; end
      8'b0101_00??: begin r = fv; zn = 1; end
      8'b0011_01??: begin n_carry++; r = {fv[6:0], m_st[ST_C]}; m_st[ST_C] = fv[7]; zn = 1; end
      8'b0100_01??: begin r = {fv[6:0], fv[7]}; zn = 1; end
      8'b0011_00??: begin n_carry++; r = {m_st[ST_C], fv[7:1]}; m_st[ST_C] = fv[0]; zn = 1; end
      8'b0100_00??: begin r = {fv[0], fv[7:1]}; zn = 1; end
      8'b0011_10??: r = {fv[3:0], fv[7:4]};
      8'b0101_01??: begin n_carry++; s = add9(m_w, ~fv, m_st[ST_C], 1, m_st); r = s[7:0]; zn = 1; end
      8'b0101_11??: begin s = add9(fv, ~m_w, 1, 1, m_st); r = s[7:0]; zn = 1; end
      8'b0101_10??: begin n_carry++; s = add9(fv, ~m_w, m_st[ST_C], 1, m_st); r = s[7:0]; zn = 1; end
      8'b0110_101?: begin r = 0; m_st[ST_Z] = 1; wr_f = 1; end
      8'b0110_100?: begin r = 8'hFF; wr_f = 1; end
      8'b0110_111?: begin r = m_w; wr_f = 1; end
      8'b0110_110?: begin s = add9(8'h00, ~fv, 1, 1, m_st); r = s[7:0]; zn = 1; wr_f = 1; end
      8'b1001_????: begin r = fv & ~mask; wr_f = 1; end
      8'b1000_????: begin r = fv | mask; wr_f = 1; end
      8'b0111_????: begin r = fv ^ mask; wr_f = 1; end
      8'b0000_1111: begin s = add9(k, m_w, 0, 1, m_st); m_w = s[7:0]; m_st[ST_Z] = (m_w == 0); m_st[ST_N] = m_w[7]; end
      8'b0000_1011: begin m_w = k & m_w; m_st[ST_Z] = (m_w == 0); m_st[ST_N] = m_w[7]; end
      8'b0000_1001: begin m_w = k | m_w; m_st[ST_Z] = (m_w == 0); m_st[ST_N] = m_w[7]; end
      8'b0000_1010: begin m_w = k ^ m_w; m_st[ST_Z] = (m_w == 0); m_st[ST_N] = m_w[7]; end
      8'b0000_1110: m_w = k;
      8'b0000_1000: begin s = add9(k, ~m_w, 1, 1, m_st); m_w = s[7:0]; m_st[ST_Z] = (m_w == 0); m_st[ST_N] = m_w[7]; end
      8'b0000_0001: if (k[7:4] == 0) m_bsr = {4'h0, k[3:0]};
      8'b1110_0???: begin
        bit c;
        case (w[10:8])
          3'd0: c =  m_st[ST_Z];  3'd1: c = !m_st[ST_Z];
          3'd2: c =  m_st[ST_C];  3'd3: c = !m_st[ST_C];
          3'd4: c =  m_st[ST_OV]; 3'd5: c = !m_st[ST_OV];
          3'd6: c =  m_st[ST_N];  default: c = !m_st[ST_N];
        endcase
        if (c) begin nxt = m_pc + 1 + int'(signed'(w[7:0])); n_taken++; end
        else n_ntaken++;
      end
      8'b1101_0???: begin nxt = m_pc + 1 + int'(signed'(w[10:0])); n_bra++; end
      default: ;
    endcase
    // byte-oriented: destination from d
    if (w[15:12] inside {4'b0000, 4'b0001, 4'b0010, 4'b0011, 4'b0100, 4'b0101} &&
        !(w[15:8] inside {8'h01, 8'h08, 8'h09, 8'h0A, 8'h0B, 8'h0E, 8'h0F, 8'h00}) &&
        !(w[15:10] == 6'b000000)) begin
      if (d) wr_f = 1; else wr_w = 1;
    end
    if (zn) begin m_st[ST_Z] = (r == 0); m_st[ST_N] = r[7]; end
    if (wr_w) m_w = r;
    if (wr_f) begin
      m_mem[addr] = r; m_wmem = 1; m_waddr = addr;
      if (a) n_bank++;
    end else if ((wr_w || zn) && a && w[15:12] != 4'b0000) n_bank++;
    m_pc = nxt & 10'h3FF;
  endtask

  // ------------------------------------------------------------ run
  int retired = 0, stalls = 0, memreads = 0, wregreads = 0, adds = 0, writes = 0, halts = 0;
  time t_start, t_end;

  always @(posedge id_stalled)   stalls++;
  always @(posedge of_mem_read)  memreads++;
  always @(posedge of_wreg_read) wregreads++;
  always @(posedge exe_adder)    adds++;
  always @(posedge dmem_we)      writes++;

  initial begin : watchdog
    #(64'd200_000_000);
    failures++;
    $display("watchdog: core stopped after %0d retired instructions", retired);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL #%0d pc=%0d %s: got %h expected %h", retired, m_pc, what, got, exp);
    end
  endtask

  initial begin
    void'($urandom(32'h5eed_0418));
    rst = 1'b0;
    #1 rst = 1'b1;   // a rising edge for the asynchronously reset flip-flops
    build_program();
    for (int i = 0; i < plen; i++) begin
      load_addr = PC_W'(i); load_data = prog[i]; load_we = 1'b1;
      #5 load_clk = 1'b1; #5 load_clk = 1'b0;
    end
    load_we = 1'b0;
    for (int i = plen; i < MAXPROG; i++) prog[i] = 16'h0000;
    for (int i = 0; i < 4096; i++) m_mem[i] = dut.u_dmem.mem[i];
    m_w = 0; m_st = 0; m_bsr = 0; m_pc = 0;
    #50_000 rst = 1'b0;   // longer than the slowest stage delay, so every delay line has settled
    t_start = $time;
    forever begin
      @(posedge ack_final);
      #1;
      model_step();
      retired++;
      check("WREG", 32'(wreg_q), 32'(m_w));
      check("STATUS", 32'(status_q), 32'(m_st));
      check("BSR", 32'(bsr_q), 32'(m_bsr));
      if (m_wmem) check("MEM", 32'(dut.u_dmem.mem[m_waddr]), 32'(m_mem[m_waddr]));
      if (m_pc == halt_pc) halts++;
      if (halts == 3) break;
    end
    t_end = $time;
    check("final PC", 32'(pc_q), 32'(halt_pc));
    for (int i = 0; i < 4096; i++) begin
      if (dut.u_dmem.mem[i] !== m_mem[i]) begin
        failures++;
        $display("FAIL final memory [%h] %h vs %h", i, dut.u_dmem.mem[i], m_mem[i]);
      end
    end
    checks++;
    $display("retired=%0d time=%0t ps (%0d ps/instruction)", retired, t_end - t_start,
             (t_end - t_start) / retired);
    $display("stalls=%0d no-stall=%0d taken=%0d not-taken=%0d bra=%0d memreads=%0d wregreads=%0d",
             stalls, retired - stalls, n_taken, n_ntaken, n_bra, memreads, wregreads);
    $display("carry-reads=%0d banked=%0d adder=%0d logic=%0d memwrites=%0d",
             n_carry, n_bank, adds, retired - adds, writes);
    if (stalls == 0)            begin failures++; $display("FAIL no stall happened"); end
    if (retired - stalls == 0)  begin failures++; $display("FAIL no unstalled instruction"); end
    if (n_taken == 0)           begin failures++; $display("FAIL no taken branch"); end
    if (n_ntaken == 0)          begin failures++; $display("FAIL no not-taken branch"); end
    if (n_bra == 0)             begin failures++; $display("FAIL no BRA"); end
    if (memreads == 0)          begin failures++; $display("FAIL no memory read"); end
    if (wregreads == 0)         begin failures++; $display("FAIL no WREG read"); end
    if (n_carry == 0)           begin failures++; $display("FAIL no carry read"); end
    if (n_bank == 0)            begin failures++; $display("FAIL no banked access"); end
    if (adds == 0)              begin failures++; $display("FAIL no adder use"); end
    if (writes == 0)            begin failures++; $display("FAIL no memory write"); end
    checks += 11;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
