// Reversible 1's complement (ROC): one Feynman gate per bit with the data on
// the control input and a constant 1 on the target, so f = ~a.
// Combinational.
module roc
  import rev_gates_pkg::*;
#(
  parameter int WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  output logic [WIDTH-1:0] f
);
  logic [1:0] t;

  always_comb begin
    t = '0;
    for (int i = 0; i < WIDTH; i++) begin
      t    = fg(a[i], 1'b1);
      f[i] = t[0];
    end
  end
endmodule
