// Reversible full adder/subtractor (FAS).
//
// FG(as,a) -> t = as^a; PG(t, b, 0) -> t^b and t&b; PG(ci, t^b, t&b) gives
// ci^t^b and the carry maj(t, b, ci); a final FG with as restores the sum
// a^b^ci. With as_i=0 it is a full adder, with as_i=1 it computes a-b-ci
// with borrow out. Four gates, as in the reference structure. Garbage
// outputs are brought out. Purely combinational.
module rev_fas
  import rev_gates_pkg::*;
(
  input  logic       as_i,
  input  logic       a,
  input  logic       b,
  input  logic       ci,
  output logic       sd,
  output logic       cb,
  output logic [2:0] g
);
  logic [1:0] fg1, fg2;
  logic [2:0] pg1, pg2;

  always_comb begin
    fg1 = fg(as_i, a);
    pg1 = pg(fg1[0], b, 1'b0);
    pg2 = pg(ci, pg1[1], pg1[0]);
    fg2 = fg(fg1[1], pg2[1]);
    sd  = fg2[0];
    cb  = pg2[0];
    g   = {pg1[2], pg2[2], fg2[1]};
  end
endmodule
