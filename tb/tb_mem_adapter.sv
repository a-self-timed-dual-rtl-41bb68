// tb_mem_adapter: with a small behavioural memory behind it, the read adapter
// must present the word at the address exactly one matched delay after the
// last address bit becomes valid, never earlier, and drop to NULL as soon as
// the address starts returning to NULL.
`timescale 1ps/1ps
module tb_mem_adapter;
  localparam int AW = 4, DW = 8, DELAY = 300;
  logic rst;
  logic [AW-1:0] addr_t, addr_f, mem_addr;
  logic [DW-1:0] mem_data, data_t, data_f;
  logic [DW-1:0] mem [16];
  int checks = 0, failures = 0;
  mem_adapter #(.AW(AW), .DW(DW), .DELAY(DELAY)) dut (.*);
  assign mem_data = mem[mem_addr];

  initial begin
    #1_000_000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) mem[i] = DW'($urandom);
    rst = 1; addr_t = 0; addr_f = 0; #10 rst = 0;
    for (int n = 0; n < 30; n++) begin
      logic [AW-1:0] a;
      a = AW'($urandom);
      addr_t = a & 4'b0111; addr_f = ~a & 4'b0111;   // three bits valid
      #(DELAY + 50); checks++;
      if (|(data_t | data_f)) begin failures++; $display("FAIL data with incomplete address"); end
      addr_t = a; addr_f = ~a;
      #(DELAY - 1); checks++;
      if (|(data_t | data_f)) begin failures++; $display("FAIL data before the matched delay"); end
      #2; checks++;
      if (data_t !== mem[a] || data_f !== ~mem[a]) begin
        failures++; $display("FAIL word %h at %h, exp %h", data_t, a, mem[a]);
      end
      addr_t[0] = 0; addr_f[0] = 0;
      #5; checks++;
      if ((data_t ^ data_f) !== '1) begin failures++; $display("FAIL not valid on partial NULL"); end
      addr_t = 0; addr_f = 0;
      #1; checks++;
      if (|(data_t | data_f)) begin failures++; $display("FAIL data not NULL after address"); end
      #(DELAY + 10);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
