// Reversible half adder/subtractor (HAS).
//
// One Peres gate between two Feynman gates. The first FG makes t = as^a, the
// PG gives t^b and the carry/borrow t&b, and the last FG removes as again, so
// sd = a^b in both modes. With as_i=0 the circuit adds (carry a&b); with
// as_i=1 it computes a-b (borrow a'&b). Gate order as in the reference
// structure; the garbage outputs are brought out so nothing is lost.
// Purely combinational.
module rev_has
  import rev_gates_pkg::*;
(
  input  logic       as_i,
  input  logic       a,
  input  logic       b,
  output logic       sd,
  output logic       cb,
  output logic [1:0] g
);
  logic [1:0] fg1, fg2;
  logic [2:0] pg1;

  always_comb begin
    fg1 = fg(as_i, a);
    pg1 = pg(fg1[0], b, 1'b0);
    fg2 = fg(fg1[1], pg1[1]);
    sd  = fg2[0];
    cb  = pg1[0];
    g   = {pg1[2], fg2[1]};
  end
endmodule
