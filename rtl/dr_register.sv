`timescale 1ps/1ps
// dr_register: W-bit dual-rail register with write acknowledge and NR gated
// read ports.
//
// Each bit is a set/reset latch of two cross-coupled NOR gates: din.t sets it,
// din.f clears it, NULL holds. The bit acknowledges a write once the stored
// value equals the valid input ((din.t & q) | (din.f & ~q)), and the ack
// returns to 0 when din returns to NULL; a bit left NULL is not written and
// does not ack. A read port drives dout.t = read.t & q and
// dout.f = (read.t & ~q) | read.f: read.t returns the stored value, read.f
// returns a valid 0 without looking at the register, and NULL on both read
// rails gives NULL. Reset clears the register to 0. Storage is a latch by
// design.
//
// The NOR-latch bit, the compare-based acknowledge and the read.t/read.f read
// port follow the thesis's register; the multiple read ports and the q
// observation output are this design's additions.
module dr_register #(
  parameter int unsigned W  = 8,
  parameter int unsigned NR = 1
) (
  input  logic                 rst,
  input  logic [W-1:0]         din_t, din_f,
  output logic [W-1:0]         ack,
  input  logic [NR-1:0]        rd_t, rd_f,
  output logic [NR-1:0][W-1:0] dout_t, dout_f,
  output logic [W-1:0]         q          // stored value, for observation
);
  always_latch begin
    for (int i = 0; i < W; i++) begin
      if (rst)           q[i] = 1'b0;
      else if (din_t[i]) q[i] = 1'b1;
      else if (din_f[i]) q[i] = 1'b0;
    end
  end

  assign ack = (din_t & q) | (din_f & ~q);

  always_comb begin
    for (int r = 0; r < NR; r++) begin
      dout_t[r] = {W{rd_t[r]}} & q;
      dout_f[r] = ({W{rd_t[r]}} & ~q) | {W{rd_f[r]}};
    end
  end
endmodule
