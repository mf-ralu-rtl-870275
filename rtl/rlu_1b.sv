// 1-bit reversible logical unit (RLU).
//
// Gate-level: an FG fans out b, a PG gives a^b and a&b, a UG with c=0 gives
// a|b, and four FGs with a constant 1 invert a|b, a&b, a^b and a. Those eight
// functions feed a tree of seven COG gates used as 2:1 multiplexers, s[0] at
// the first level, s[1] at the second and s[2] at the root:
//   s = 0 OR, 1 NOR, 2 buffer (a), 3 AND, 4 NOT a, 5 XOR, 6 XNOR, 7 NAND.
// Gate counts (5 FG, 1 PG, 1 UG, 7 COG) follow the reference design; which
// function sits on which leaf follows its operation table, and the buffer
// passing a is this design's reading of that table. Combinational.
module rlu_1b
  import rev_gates_pkg::*;
(
  input  logic       a,
  input  logic       b,
  input  logic [2:0] s,
  output logic       fo
);
  logic [1:0] fgb, fg_nor, fg_nand, fg_xnor, fg_not;
  logic [2:0] pg1, ug1;
  logic [7:0] fn;
  logic [3:0] l1;
  logic [1:0] l2;

  always_comb begin
    fgb     = fg(b, 1'b0);                 // b and a copy of b
    pg1     = pg(a, fgb[1], 1'b0);         // q = a^b, r = a&b
    ug1     = ug(a, fgb[0], 1'b0);         // p = a|b
    fg_nor  = fg(ug1[2], 1'b1);
    fg_nand = fg(pg1[0], 1'b1);
    fg_xnor = fg(pg1[1], 1'b1);
    fg_not  = fg(pg1[2], 1'b1);
    fn = {fg_nand[0], fg_xnor[0], pg1[1], fg_not[0], pg1[0], pg1[2], fg_nor[0], ug1[2]};
    for (int i = 0; i < 4; i++) l1[i] = cog_mux(s[0], fn[2*i], fn[2*i+1]);
    for (int i = 0; i < 2; i++) l2[i] = cog_mux(s[1], l1[2*i], l1[2*i+1]);
    fo = cog_mux(s[2], l2[0], l2[1]);
  end
endmodule
