// N-bit ripple of reversible full adder/subtractors.
//
// The "n-bit FAS" unit that the adders and multipliers are built from:
// WIDTH rev_fas cells with each carry/borrow out feeding the next cell.
// as_i=0: s = a + b + ci, co is the carry. as_i=1: s = a - b - ci, co is
// the borrow. Garbage outputs of the cells are left unconnected.
// Purely combinational; delay grows linearly with WIDTH.
module rfas_chain #(
  parameter int WIDTH = 4
) (
  input  logic             as_i,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             ci,
  output logic [WIDTH-1:0] s,
  output logic             co
);
  logic [WIDTH:0] c;
  assign c[0] = ci;
  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    logic [2:0] unused_g;
    rev_fas u_fas (.as_i(as_i), .a(a[i]), .b(b[i]), .ci(c[i]),
                   .sd(s[i]), .cb(c[i+1]), .g(unused_g));
  end
  assign co = c[WIDTH];
endmodule
