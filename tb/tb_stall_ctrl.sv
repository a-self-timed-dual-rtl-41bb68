// tb_stall_ctrl: with stall = 0 the opCode bit passes at once; with stall = 1
// it stays NULL until ack rises, then passes, and the C-elements return to 0
// only after both the bit and ack have fallen. Both values of the bit are
// tried on both paths.
`timescale 1ps/1ps
module tb_stall_ctrl;
  logic rst, in_t, in_f, stall_t, stall_f, ack, out_t, out_f, stalled;
  int checks = 0, failures = 0;
  stall_ctrl dut (.*);

  task automatic chk(logic et, logic ef, string what);
    #10; checks++;
    if (out_t !== et || out_f !== ef) begin
      failures++; $display("FAIL %s: out=%b%b exp %b%b", what, out_t, out_f, et, ef);
    end
  endtask

  initial begin
    #1_000_000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst = 1; in_t = 1; in_f = 0; stall_t = 1; stall_f = 0; ack = 1; #10;
    checks++; if (out_t || out_f) begin failures++; $display("FAIL reset"); end
    in_t = 0; stall_t = 0; ack = 0; #10 rst = 0;
    for (int n = 0; n < 8; n++) begin
      logic v, s;
      {v, s} = 2'(n);
      stall_t = s; stall_f = ~s;
      in_t = v; in_f = ~v;
      if (!s) chk(v, ~v, "bypass");
      else begin
        chk(0, 0, "stalled");
        checks++; if (!stalled) begin failures++; $display("FAIL stalled flag"); end
        #100; chk(0, 0, "still stalled");
        ack = 1;
        chk(v, ~v, "released by ack");
      end
      in_t = 0; in_f = 0; stall_t = 0; stall_f = 0;
      if (s) begin
        chk(v, ~v, "held until ack falls");
        ack = 0;
      end
      chk(0, 0, "null");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
