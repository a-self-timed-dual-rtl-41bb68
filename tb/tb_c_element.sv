// tb_c_element: checks the C-element truth table (00 -> 0, 11 -> 1, 01/10
// hold the previous output) from both previous states, and that reset forces 0.
`timescale 1ps/1ps
module tb_c_element;
  logic rst, a, b, y;
  int checks = 0, failures = 0;
  c_element dut (.rst, .a, .b, .y);

  task automatic apply(logic na, logic nb, logic exp);
    a = na; b = nb; #10;
    checks++;
    if (y !== exp) begin failures++; $display("FAIL a=%b b=%b y=%b exp=%b", a, b, y, exp); end
  endtask

  initial begin
    #100000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst = 1; a = 1; b = 1; #10;
    checks++; if (y !== 0) failures++;
    rst = 0;
    apply(0, 0, 0);
    apply(0, 1, 0);
    apply(1, 0, 0);
    apply(1, 1, 1);
    apply(0, 1, 1);
    apply(1, 0, 1);
    apply(0, 0, 0);
    apply(1, 0, 0);
    apply(1, 1, 1);
    apply(1, 0, 1);
    rst = 1; #10; checks++; if (y !== 0) failures++;
    rst = 0;
    apply(1, 1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
