// n-bit reversible ALU (RALU): 16 operations.
//
// An n-bit RAU and an n-bit RLU work on the same a, b and s[2:0]; a row of
// MFG 2:1 multiplexers on s[3] picks the RAU result (s[3]=0, operations 0-7)
// or the RLU result (s[3]=1, operations 8-15). co is the RAU carry out
// regardless of s[3]. The default WIDTH=1 is the single-bit RALU; WIDTH=32
// gives the 32-bit RALU. Combinational.
module ralu
  import rev_gates_pkg::*;
#(
  parameter int WIDTH = 1
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [3:0]       s,
  output logic [WIDTH-1:0] fo,
  output logic             co
);
  logic [WIDTH-1:0] f_au, f_lu;

  rau #(.WIDTH(WIDTH)) u_rau (.a(a), .b(b), .s(s[2:0]), .f(f_au), .co(co));
  rlu #(.WIDTH(WIDTH)) u_rlu (.a(a), .b(b), .s(s[2:0]), .f(f_lu));

  always_comb
    for (int i = 0; i < WIDTH; i++) fo[i] = mfg_mux(s[3], f_au[i], f_lu[i]);
endmodule
