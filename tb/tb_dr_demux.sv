// tb_dr_demux: a token with select 1 appears on path A only, with select 0 on
// path B only; both paths return to NULL with the input and select.
`timescale 1ps/1ps
module tb_dr_demux;
  localparam int W = 4;
  logic rst, sel_t, sel_f;
  logic [W-1:0] in_t, in_f, a_t, a_f, b_t, b_f;
  int checks = 0, failures = 0;
  dr_demux #(.W(W)) dut (.*);

  task automatic chk(logic [W-1:0] eat, eaf, ebt, ebf, string what);
    #10; checks++;
    if (a_t !== eat || a_f !== eaf || b_t !== ebt || b_f !== ebf) begin
      failures++; $display("FAIL %s: a=%h/%h b=%h/%h", what, a_t, a_f, b_t, b_f);
    end
  endtask

  initial begin
    #100000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst = 1; in_t = 0; in_f = 0; sel_t = 0; sel_f = 0; #10 rst = 0;
    for (int n = 0; n < 20; n++) begin
      logic [W-1:0] v; logic s;
      v = W'($urandom); s = 1'($urandom);
      in_t = v; in_f = ~v;
      chk(0, 0, 0, 0, "no select yet");
      sel_t = s; sel_f = ~s;
      if (s) chk(v, ~v, 0, 0, "path A"); else chk(0, 0, v, ~v, "path B");
      in_t = 0; in_f = 0; sel_t = 0; sel_f = 0;
      chk(0, 0, 0, 0, "null");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
