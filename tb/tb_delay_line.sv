// tb_delay_line: every change of the input appears on the output exactly
// DELAY later and not before.
`timescale 1ps/1ps
module tb_delay_line;
  localparam int W = 8, DELAY = 250;
  logic [W-1:0] d, q;
  int checks = 0, failures = 0;
  delay_line #(.W(W), .DELAY(DELAY)) dut (.d, .q);

  initial begin
    #1_000_000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [W-1:0] prev;
    d = 0; #(2*DELAY);
    for (int n = 0; n < 20; n++) begin
      prev = d;
      d = W'($urandom) | 8'h01;
      if (d == prev) d = ~prev;
      #(DELAY - 1); checks++;
      if (q !== prev) begin failures++; $display("FAIL early change %h", q); end
      #2; checks++;
      if (q !== d) begin failures++; $display("FAIL q=%h exp %h", q, d); end
      #(DELAY);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
