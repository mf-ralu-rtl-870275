// 1-bit reversible arithmetic unit (RAU).
//
// Three gates: an MFR gate fed (a, s[1], s[2]) whose r output
// x = a'&s[2] ^ a&s[1] picks the adder's first operand (s[2:1] = 00: 0,
// 01: a, 10: a', 11: 1); a Peres gate fed (b, s[0], 0) gives b^s[0] and
// b&s[0]; a second Peres gate fed (x, b^s[0], b&s[0]) completes a full adder,
// fo = x^b^s[0] and co = its carry. s[0] is the carry in. Chained over n bits
// (rau) this yields B, B+1, A+B, A+B+1, A'+B, A'+B+1, B-1, B for s = 0..7.
// The gate connections follow the reference figure. Combinational.
module rau_1b
  import rev_gates_pkg::*;
(
  input  logic       a,
  input  logic       b,
  input  logic [2:0] s,
  output logic       fo,
  output logic       co
);
  logic [2:0] mfr1, pg1, pg2;

  always_comb begin
    mfr1 = mfr(a, s[1], s[2]);
    pg1  = pg(b, s[0], 1'b0);
    pg2  = pg(mfr1[0], pg1[1], pg1[0]);
    fo   = pg2[1];
    co   = pg2[0];
  end
endmodule
