// tb_dr_ripple_adder: random 8-bit additions with carry-in through the
// dual-rail ripple adder. Checks the sum and every internal carry against
// integer arithmetic, that no output is valid before the last input bit is,
// and that all outputs return to NULL with the inputs.
`timescale 1ps/1ps
module tb_dr_ripple_adder;
  localparam int W = 8;
  logic rst;
  logic [W-1:0] a_t, a_f, b_t, b_f, s_t, s_f, co_t, co_f;
  logic ci_t, ci_f;
  int checks = 0, failures = 0;
  dr_ripple_adder #(.W(W)) dut (.*);

  initial begin
    #10_000_000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst = 1; a_t = 0; a_f = 0; b_t = 0; b_f = 0; ci_t = 0; ci_f = 0; #10 rst = 0;
    for (int n = 0; n < 300; n++) begin
      logic [W-1:0] a, b, carries;
      logic c;
      logic [W:0] s;
      a = W'($urandom); b = W'($urandom); c = 1'($urandom);
      if (n == 0) begin a = 8'hFF; b = 8'h01; c = 0; end
      s = {1'b0, a} + {1'b0, b} + (W+1)'(c);
      for (int i = 0; i < W; i++) begin
        logic [W:0] p;
        p = {1'b0, a & ((W)'(1) << (i+1)) - 1} ;
        carries[i] = (((W+1)'(a & W'((1 << (i+1)) - 1)) + (W+1)'(b & W'((1 << (i+1)) - 1)) + (W+1)'(c)) >> (i+1)) != 0;
      end
      a_t = a; a_f = ~a; b_t = b; b_f = ~b;
      #10; checks++;
      if (|(s_t | s_f) || |(co_t | co_f)) begin failures++; $display("FAIL output before carry-in"); end
      ci_t = c; ci_f = ~c;
      #10; checks++;
      if (s_t !== s[W-1:0] || s_f !== ~s[W-1:0] || co_t !== carries || co_f !== ~carries) begin
        failures++; $display("FAIL %h+%h+%b: s=%h co=%h exp %h %h", a, b, c, s_t, co_t, s[W-1:0], carries);
      end
      a_t = 0; a_f = 0; b_t = 0; b_f = 0;
      #10; checks++;
      if (s_t !== s[W-1:0]) begin failures++; $display("FAIL output left before carry-in NULL"); end
      ci_t = 0; ci_f = 0;
      #10; checks++;
      if (|(s_t | s_f | co_t | co_f)) begin failures++; $display("FAIL not NULL"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
