// tb_imem: loads random words through the load port and reads every one back
// through the asynchronous read port.
`timescale 1ps/1ps
module tb_imem;
  localparam int AW = 10, DW = 16;
  logic [AW-1:0] addr, load_addr;
  logic [DW-1:0] rdata, load_data;
  logic load_clk = 0, load_we;
  logic [DW-1:0] model [2**AW];
  int checks = 0, failures = 0;
  imem #(.AW(AW), .DW(DW)) dut (.*);

  initial begin
    #100_000_000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    addr = 0; load_we = 1;
    for (int i = 0; i < 2**AW; i++) begin
      model[i] = DW'($urandom);
      load_addr = AW'(i); load_data = model[i];
      #5 load_clk = 1; #5 load_clk = 0;
    end
    load_we = 0; load_data = '1; load_addr = 0;
    #5 load_clk = 1; #5 load_clk = 0;
    for (int i = 0; i < 2**AW; i++) begin
      addr = AW'(i); #1; checks++;
      if (rdata !== model[i]) begin failures++; $display("FAIL [%0d] %h exp %h", i, rdata, model[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
