// Reversible carry select adder (RCSA): {co, s} = a + b + ci.
//
// WIDTH/8 rcsa8 blocks in a chain, each block's carry out the next block's
// carry in; the last carry is co. WIDTH must be a multiple of 8.
// Combinational.
module rcsa #(
  parameter int WIDTH = 32,
  localparam int NB = WIDTH / 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             ci,
  output logic [WIDTH-1:0] s,
  output logic             co
);
  logic [NB:0] c;
  assign c[0] = ci;
  for (genvar k = 0; k < NB; k++) begin : g_blk
    rcsa8 u_blk (.a(a[8*k +: 8]), .b(b[8*k +: 8]), .ci(c[k]), .s(s[8*k +: 8]), .co(c[k+1]));
  end
  assign co = c[NB];
endmodule
