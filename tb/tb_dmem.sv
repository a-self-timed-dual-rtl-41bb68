// tb_dmem: writes random bytes to random addresses with the write strobe and
// reads the whole memory back through the asynchronous read port.
`timescale 1ps/1ps
module tb_dmem;
  localparam int AW = 12, DW = 8;
  logic [AW-1:0] raddr, waddr;
  logic [DW-1:0] rdata, wdata;
  logic we = 0;
  logic [DW-1:0] model [2**AW];
  int checks = 0, failures = 0;
  dmem #(.AW(AW), .DW(DW)) dut (.*);

  initial begin
    #100_000_000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    raddr = 0;
    for (int i = 0; i < 2**AW; i++) begin
      model[i] = DW'($urandom); waddr = AW'(i); wdata = model[i];
      #5 we = 1; #5 we = 0;
    end
    for (int n = 0; n < 500; n++) begin
      waddr = AW'($urandom); wdata = DW'($urandom); model[waddr] = wdata;
      #5 we = 1; #5 we = 0;
    end
    for (int i = 0; i < 2**AW; i++) begin
      raddr = AW'(i); #1; checks++;
      if (rdata !== model[i]) begin failures++; $display("FAIL [%0d] %h exp %h", i, rdata, model[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
