// tb_dr_and2: for every pair of valid inputs the dual-rail AND gives a*b;
// the output stays NULL while only one input is valid and stays valid while
// only one input has returned to NULL.
`timescale 1ps/1ps
module tb_dr_and2;
  logic rst, a_t, a_f, b_t, b_f, y_t, y_f;
  int checks = 0, failures = 0;
  dr_and2 dut (.*);

  task automatic chk(logic et, logic ef, string what);
    #10; checks++;
    if (y_t !== et || y_f !== ef) begin
      failures++; $display("FAIL %s: y=%b%b exp=%b%b", what, y_t, y_f, et, ef);
    end
  endtask

  initial begin
    #100000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst = 1; {a_t, a_f, b_t, b_f} = '0; #10 rst = 0;
    for (int i = 0; i < 4; i++) begin
      logic va, vb;
      {va, vb} = 2'(i);
      a_t = va; a_f = ~va;
      chk(0, 0, "half valid");
      b_t = vb; b_f = ~vb;
      chk(va & vb, ~(va & vb), "valid");
      a_t = 0; a_f = 0;
      chk(va & vb, ~(va & vb), "half null");
      b_t = 0; b_f = 0;
      chk(0, 0, "null");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
