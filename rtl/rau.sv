// n-bit reversible arithmetic unit.
//
// WIDTH rau_1b cells in a chain: bit 0 takes the select s[2:0] as given, and
// every later bit takes s[2:1] with the previous bit's carry out in place of
// s[0]. The result for s = 0..7 is B, B+1, A+B, A+B+1, ~A+B, ~A+B+1, B-1, B
// (mod 2^WIDTH); co is the last carry. Combinational, ripple delay.
module rau #(
  parameter int WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [2:0]       s,
  output logic [WIDTH-1:0] f,
  output logic             co
);
  logic [WIDTH:0] c;
  assign c[0] = s[0];
  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    rau_1b u_bit (.a(a[i]), .b(b[i]), .s({s[2:1], c[i]}), .fo(f[i]), .co(c[i+1]));
  end
  assign co = c[WIDTH];
endmodule
