// Reversible 2^SEL_BITS : 1 word multiplexer, a binary tree of MFG 2:1
// multiplexers (sel[0] at the leaves, the top select bit at the root).
// Output f = d[sel]. Used for the three output multiplexers of the MF-RALU.
// Combinational.
module rmux_tree
  import rev_gates_pkg::*;
#(
  parameter int WIDTH    = 32,
  parameter int SEL_BITS = 3,
  localparam int N = 1 << SEL_BITS
) (
  input  logic [N-1:0][WIDTH-1:0] d,
  input  logic [SEL_BITS-1:0]     sel,
  output logic [WIDTH-1:0]        f
);
  logic [SEL_BITS:0][N-1:0][WIDTH-1:0] lv;

  always_comb begin
    lv = '0;
    lv[0] = d;
    for (int k = 0; k < SEL_BITS; k++)
      for (int j = 0; j < (N >> (k + 1)); j++)
        for (int i = 0; i < WIDTH; i++)
          lv[k+1][j][i] = mfg_mux(sel[k], lv[k][2*j][i], lv[k][2*j+1][i]);
    f = lv[SEL_BITS][0];
  end
endmodule
