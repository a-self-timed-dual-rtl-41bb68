// tb_dr_register: writes random words (only the bits given valid data change
// and acknowledge), reads them back through read.t, checks that read.f gives a
// valid zero, that NULL read gives NULL and that the value holds while din is
// NULL.
`timescale 1ps/1ps
module tb_dr_register;
  localparam int W = 8;
  logic rst;
  logic [W-1:0] din_t, din_f, ack, q;
  logic [1:0] rd_t, rd_f;
  logic [1:0][W-1:0] dout_t, dout_f;
  int checks = 0, failures = 0;
  dr_register #(.W(W), .NR(2)) dut (.*);

  task automatic expect_eq(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  initial begin
    #1_000_000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [W-1:0] model;
    rst = 1; din_t = 0; din_f = 0; rd_t = 0; rd_f = 0; #10 rst = 0;
    model = 0;
    expect_eq(q, 0, "reset");
    for (int n = 0; n < 50; n++) begin
      logic [W-1:0] v, m;
      v = W'($urandom); m = W'($urandom);
      din_t = v & m; din_f = ~v & m;
      #10;
      model = (model & ~m) | (v & m);
      expect_eq(ack, m, "write ack");
      din_t = 0; din_f = 0;
      #10;
      expect_eq(ack, 0, "ack released");
      rd_t = 2'b01; #10;
      expect_eq(dout_t[0], model, "read t");
      expect_eq(dout_f[0], W'(~model), "read f");
      expect_eq({dout_t[1], dout_f[1]}, 0, "other port NULL");
      rd_t = 0; rd_f = 2'b10; #10;
      expect_eq(dout_t[1], 0, "read.f t rails");
      expect_eq(dout_f[1], {W{1'b1}}, "read.f gives valid zero");
      rd_f = 0; #10;
      expect_eq({dout_t, dout_f}, 0, "NULL read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
