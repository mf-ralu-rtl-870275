// Reversible Kogge-Stone adder (RKSA): {co, s} = a + b + ci.
//
// Square box: p[i] = a^b (Feynman), g[i] = a&b (MCF AND); ci is folded into
// bit 0 as g[0] |= p[0]&ci. Big circles: log2(WIDTH) prefix levels, at level
// k node i (i >= 2^k) takes G = g[i] | p[i]&g[i-2^k] and P = p[i]&p[i-2^k].
// Small circles: the carry out of bit i is the final G[i]. Triangles:
// s[i] = p[i] ^ c[i-1] with c[-1] = ci. Combinational, log depth.
module rksa
  import rev_gates_pkg::*;
#(
  parameter int WIDTH = 32,
  localparam int LV = $clog2(WIDTH)
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             ci,
  output logic [WIDTH-1:0] s,
  output logic             co
);
  logic [LV:0][WIDTH-1:0] gg, pp;
  logic [WIDTH-1:0]       p0, c;
  logic [1:0]             t_fg;
  logic [2:0]             t_a, t_b, t_o;

  always_comb begin
    t_fg = '0; t_a = '0; t_b = '0; t_o = '0;
    // square box
    for (int i = 0; i < WIDTH; i++) begin
      t_fg     = fg(a[i], b[i]);
      t_a      = mcf_and(a[i], b[i]);
      p0[i]    = t_fg[0];
      gg[0][i] = t_a[1];
      pp[0][i] = t_fg[0];
    end
    t_a      = mcf_and(p0[0], ci);
    t_o      = mcf_or(gg[0][0], t_a[1]);
    gg[0][0] = t_o[1];
    // big circles
    for (int k = 0; k < LV; k++)
      for (int i = 0; i < WIDTH; i++)
        if (i >= (1 << k)) begin
          t_a        = mcf_and(pp[k][i], gg[k][i - (1 << k)]);
          t_o        = mcf_or(gg[k][i], t_a[1]);
          t_b        = mcf_and(pp[k][i], pp[k][i - (1 << k)]);
          gg[k+1][i] = t_o[1];
          pp[k+1][i] = t_b[1];
        end else begin
          gg[k+1][i] = gg[k][i];
          pp[k+1][i] = pp[k][i];
        end
    // small circles and triangles
    c = gg[LV];
    for (int i = 0; i < WIDTH; i++) begin
      t_fg = fg(p0[i], (i == 0) ? ci : c[i-1]);
      s[i] = t_fg[0];
    end
    co = c[WIDTH-1];
  end
endmodule
