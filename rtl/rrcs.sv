// Reversible ripple carry adder/subtractor (RRCA/RRCS).
//
// One HAS for bit 0 followed by WIDTH-1 FAS cells in a ripple; there is no
// carry input. as_i=0 adds (s = a+b, co = carry), as_i=1 subtracts
// (s = a-b, co = borrow). For WIDTH=32 this is 3 + 31*4 = 127 gates.
// Purely combinational.
module rrcs #(
  parameter int WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             as_i,
  output logic [WIDTH-1:0] s,
  output logic             co
);
  logic       c0;
  logic [1:0] unused_g;

  rev_has u_has (.as_i(as_i), .a(a[0]), .b(b[0]), .sd(s[0]), .cb(c0), .g(unused_g));

  rfas_chain #(.WIDTH(WIDTH-1)) u_chain (
    .as_i(as_i), .a(a[WIDTH-1:1]), .b(b[WIDTH-1:1]), .ci(c0),
    .s(s[WIDTH-1:1]), .co(co)
  );
endmodule
