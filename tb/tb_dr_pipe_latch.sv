// tb_dr_pipe_latch: the latch passes a token while the next stage is empty,
// holds it (ignoring the NULL at its input) until the next stage acknowledges,
// only then passes the spacer, and will not take the next token before the
// next stage's acknowledge has fallen; done follows completion.
`timescale 1ps/1ps
module tb_dr_pipe_latch;
  localparam int W = 6;
  logic rst, ack_next, done;
  logic [W-1:0] in_t, in_f, out_t, out_f;
  int checks = 0, failures = 0;
  dr_pipe_latch #(.W(W)) dut (.*);

  task automatic chk(logic [W-1:0] et, ef, logic ed, string what);
    #10; checks++;
    if (out_t !== et || out_f !== ef || done !== ed) begin
      failures++; $display("FAIL %s: out=%h/%h done=%b", what, out_t, out_f, done);
    end
  endtask

  initial begin
    #1_000_000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst = 1; in_t = 0; in_f = 0; ack_next = 0; #10 rst = 0;
    for (int n = 0; n < 20; n++) begin
      logic [W-1:0] v, v2;
      v = W'($urandom); v2 = W'($urandom);
      in_t = v; in_f = ~v;
      chk(v, ~v, 1, "capture");
      in_t = 0; in_f = 0;
      chk(v, ~v, 1, "hold until ack");
      ack_next = 1;
      chk(0, 0, 0, "spacer after ack");
      in_t = v2; in_f = ~v2;
      chk(0, 0, 0, "blocked while ack high");
      ack_next = 0;
      chk(v2, ~v2, 1, "next token");
      ack_next = 1; in_t = 0; in_f = 0;
      chk(0, 0, 0, "drain");
      ack_next = 0;
      #10;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
