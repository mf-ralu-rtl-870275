// n-bit reversible logical unit: WIDTH rlu_1b cells side by side, all on the
// same select s[2:0] (0 OR, 1 NOR, 2 A, 3 AND, 4 ~A, 5 XOR, 6 XNOR, 7 NAND).
// Combinational, no carries between bits.
module rlu #(
  parameter int WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [2:0]       s,
  output logic [WIDTH-1:0] f
);
  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    rlu_1b u_bit (.a(a[i]), .b(b[i]), .s(s), .fo(f[i]));
  end
endmodule
