// Reversible 2:1 word multiplexer (RMUX): f = s ? a : b, one MFG per bit
// with s on the control input. Combinational.
module rmux
  import rev_gates_pkg::*;
#(
  parameter int WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             s,
  output logic [WIDTH-1:0] f
);
  always_comb
    for (int i = 0; i < WIDTH; i++) f[i] = mfg_mux(s, b[i], a[i]);
endmodule
