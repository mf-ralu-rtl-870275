// Reversible carry look-ahead adder (RCLA): {co, s} = a + b + ci.
//
// The look-ahead logic forms g[i] = a[i]&b[i] with MCF-AND gates and
// p[i] = a[i]|b[i] with MCF-OR gates, and the carries
// c[i+1] = g[i] | p[i]&c[i] from further MCF AND/OR gates, c[0] = ci. Each bit
// then has its own FAS that adds a[i], b[i] and c[i]; the FAS carry outputs
// are not used. Combinational.
module rcla
  import rev_gates_pkg::*;
#(
  parameter int WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             ci,
  output logic [WIDTH-1:0] s,
  output logic             co
);
  logic [WIDTH-1:0] g, p;
  logic [WIDTH:0]   c;
  logic [2:0]       t_g, t_p, t_pc, t_c;

  always_comb begin
    c[0] = ci;
    t_g = '0; t_p = '0; t_pc = '0; t_c = '0;
    for (int i = 0; i < WIDTH; i++) begin
      t_g    = mcf_and(a[i], b[i]);
      t_p    = mcf_or(a[i], b[i]);
      g[i]   = t_g[1];
      p[i]   = t_p[1];
      t_pc   = mcf_and(p[i], c[i]);
      t_c    = mcf_or(g[i], t_pc[1]);
      c[i+1] = t_c[1];
    end
    co = c[WIDTH];
  end

  for (genvar i = 0; i < WIDTH; i++) begin : g_fas
    logic       unused_cb;
    logic [2:0] unused_g;
    rev_fas u_fas (.as_i(1'b0), .a(a[i]), .b(b[i]), .ci(c[i]),
                   .sd(s[i]), .cb(unused_cb), .g(unused_g));
  end
endmodule
