// tb_exe_stage: random operand bundles for every EXE function. The expected
// result and flags are computed here from integer arithmetic (carry from a
// 9-bit sum, digit carry from the low nibbles, overflow from operand and
// result signs). Checks that the result stays NULL until the whole operand
// bundle is valid, that the adder path is used only by ADD, that the forwarded
// control fields arrive unchanged and that everything returns to NULL.
`timescale 1ps/1ps
module tb_exe_stage;
  import apic_pkg::*;
  logic rst, used_adder;
  logic [OPND_W-1:0] i_t, i_f;
  logic [RES_W-1:0]  o_t, o_f;
  int checks = 0, failures = 0;
  exe_stage dut (.*);

  task automatic expect_eq(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  initial begin
    #100_000_000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst = 1; i_t = 0; i_f = 0; #10 rst = 0;
    for (int n = 0; n < 2000; n++) begin
      opnd_t op;
      res_t  r, rf;
      logic [7:0] s1, s2, y;
      logic       ci, c, dc, ov;
      logic [8:0] full;
      s1 = 8'($urandom); s2 = 8'($urandom); ci = 1'($urandom);
      op.x.fn      = fn_e'($urandom_range(0, 10));
      op.x.dest    = dest_e'($urandom);
      op.x.st_mask = 5'($urandom);
      op.x.addr    = 12'($urandom);
      op.s1 = s1; op.s2 = s2; op.cin = ci;
      c = 0; dc = 0; ov = 0;
      case (op.x.fn)
        FN_ADD: begin
          full = 9'(s1) + 9'(s2) + 9'(ci);
          y  = full[7:0];
          c  = full[8];
          dc = (5'(s1[3:0]) + 5'(s2[3:0]) + 5'(ci)) > 5'd15;
          ov = (s1[7] == s2[7]) && (y[7] != s1[7]);
        end
        FN_AND:   y = s1 & s2;
        FN_IOR:   y = s1 | s2;
        FN_XOR:   y = s1 ^ s2;
        FN_PASS1: y = s1;
        FN_PASS2: y = s2;
        FN_RLC:   begin y = (s1 << 1) | 8'(ci); c = s1[7]; end
        FN_RLNC:  y = (s1 << 1) | (s1 >> 7);
        FN_RRC:   begin y = (s1 >> 1) | (8'(ci) << 7); c = s1[0]; end
        FN_RRNC:  y = (s1 >> 1) | (s1 << 7);
        default:  y = (s1 << 4) | (s1 >> 4);
      endcase
      // first everything except the carry-in
      i_t = op; i_f = ~op;
      i_t[0] = 0; i_f[0] = 0;
      #200;
      r = o_t; rf = o_f;
      expect_eq({r.result, rf.result, r.flags, rf.flags}, 0, "result before complete operands");
      i_t[0] = ci; i_f[0] = ~ci;
      #200;
      r = o_t; rf = o_f;
      expect_eq(r.result, y, $sformatf("result fn=%0d %h %h %b", op.x.fn, s1, s2, ci));
      expect_eq(rf.result, 8'(~y), "result f rails");
      expect_eq(r.flags, {y[7], ov, y == 0, dc, c}, $sformatf("flags fn=%0d %h %h %b", op.x.fn, s1, s2, ci));
      expect_eq(rf.flags, 5'(~{y[7], ov, y == 0, dc, c}), "flag f rails");
      expect_eq({r.dest, r.st_mask, r.addr}, {op.x.dest, op.x.st_mask, op.x.addr}, "forwarded control");
      expect_eq(used_adder, op.x.fn == FN_ADD, "adder path use");
      i_t = 0; i_f = 0;
      #200;
      expect_eq({o_t, o_f} == 0, 1, "NULL");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
