// 8 x 8 reversible Wallace tree multiplier (WM8): p = a * b, unsigned.
//
// Eight partial-product rows a & b[j] from MCF-AND gates, each placed at bit
// j, are reduced to two rows by a carry-save tree of FAS cells and added by a
// 16-bit FAS ripple. Combinational.
module rwm8
  import rev_gates_pkg::*;
(
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p
);
  logic [7:0][15:0] rows;
  logic [15:0]      cs_sum, cs_carry;
  logic [2:0]       t_and;
  logic             unused_co;

  always_comb begin
    rows  = '0;
    t_and = '0;
    for (int j = 0; j < 8; j++)
      for (int i = 0; i < 8; i++) begin
        t_and = mcf_and(a[i], b[j]);
        rows[j][i+j] = t_and[1];
      end
  end

  csa_tree #(.ROWS(8), .W(16)) u_csa (.d(rows), .sum(cs_sum), .carry(cs_carry));

  rfas_chain #(.WIDTH(16)) u_add (.as_i(1'b0), .a(cs_sum), .b(cs_carry), .ci(1'b0),
                                  .s(p), .co(unused_co));
endmodule
