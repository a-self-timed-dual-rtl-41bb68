// tb_mem_wr_adapter: the write adapter raises the strobe and the acknowledge
// one matched delay after address and data are both complete, presents their
// true rails to the memory, and drops both at once when the bundles have
// returned to NULL. A behavioural memory behind it must hold every word written.
`timescale 1ps/1ps
module tb_mem_wr_adapter;
  localparam int AW = 4, DW = 8, DELAY = 200;
  logic rst, mem_we, ack;
  logic [AW-1:0] addr_t, addr_f, mem_addr;
  logic [DW-1:0] data_t, data_f, mem_data;
  logic [DW-1:0] mem [16], model [16];
  int checks = 0, failures = 0;
  mem_wr_adapter #(.AW(AW), .DW(DW), .DELAY(DELAY)) dut (.*);
  always @(posedge mem_we) mem[mem_addr] <= mem_data;

  initial begin
    #1_000_000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin mem[i] = 0; model[i] = 0; end
    rst = 1; addr_t = 0; addr_f = 0; data_t = 0; data_f = 0; #10 rst = 0;
    for (int n = 0; n < 40; n++) begin
      logic [AW-1:0] a; logic [DW-1:0] d;
      a = AW'($urandom); d = DW'($urandom);
      addr_t = a; addr_f = ~a;
      #(DELAY + 20); checks++;
      if (mem_we || ack) begin failures++; $display("FAIL strobe without data"); end
      data_t = d; data_f = ~d;
      #(DELAY - 1); checks++;
      if (mem_we || ack) begin failures++; $display("FAIL strobe before the matched delay"); end
      #2; checks++;
      if (!mem_we || !ack) begin failures++; $display("FAIL no strobe"); end
      model[a] = d;
      data_t = 0; data_f = 0;
      #5; checks++;
      if (!ack) begin failures++; $display("FAIL ack dropped on partial NULL"); end
      addr_t = 0; addr_f = 0;
      #1; checks++;
      if (mem_we || ack) begin failures++; $display("FAIL strobe stays after NULL"); end
      #(DELAY + 10);
    end
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (mem[i] !== model[i]) begin failures++; $display("FAIL mem[%0d]=%h exp %h", i, mem[i], model[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
