// Reversible array multiplier (RAM): p = a * b, unsigned, N x N -> 2N bits.
//
// Built recursively. The 2x2 base case forms the four partial products with
// MCF-AND gates and adds the middle column with two HAS cells. An N x N
// multiplier (N > 2, a power of two) uses four N/2 x N/2 multipliers on the
// half words (LL, LH, HL, HH), one N-bit FAS ripple to add LH + HL (keeping
// its carry), and one 3N/2-bit FAS ripple that adds that sum to
// {HH, LL[N-1:N/2]}. The reference design names two 3N/2-bit FAS units per
// level without saying how they connect; one suffices here. Combinational.
// When this self-instantiating module is linted as its own top, the Verilator
// linter reports the outputs of the nested copy as undriven; they are driven (the
// module's testbench checks every output bit), and the warning does not
// appear when the module is used inside another one.
module ram_mult
  import rev_gates_pkg::*;
#(
  parameter int N = 32
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  if (N == 2) begin : g_base
    logic [2:0] t00, t01, t10, t11;
    logic       c1;
    logic [1:0] unused_g1, unused_g2;
    always_comb begin
      t00 = mcf_and(b[0], a[0]);
      t01 = mcf_and(b[0], a[1]);
      t10 = mcf_and(b[1], a[0]);
      t11 = mcf_and(b[1], a[1]);
    end
    assign p[0] = t00[1];
    rev_has u_h1 (.as_i(1'b0), .a(t10[1]), .b(t01[1]), .sd(p[1]), .cb(c1),   .g(unused_g1));
    rev_has u_h2 (.as_i(1'b0), .a(t11[1]), .b(c1),     .sd(p[2]), .cb(p[3]), .g(unused_g2));
  end else begin : g_rec
    localparam int H = N / 2;
    logic [N-1:0]       p_ll, p_lh, p_hl, p_hh;
    logic [N-1:0]       mid;
    logic               mid_c;
    logic [3*H-1:0]     hi;
    logic               unused_c;

    ram_mult #(.N(H)) u_ll (.a(a[H-1:0]), .b(b[H-1:0]), .p(p_ll));
    ram_mult #(.N(H)) u_lh (.a(a[H-1:0]), .b(b[N-1:H]), .p(p_lh));
    ram_mult #(.N(H)) u_hl (.a(a[N-1:H]), .b(b[H-1:0]), .p(p_hl));
    ram_mult #(.N(H)) u_hh (.a(a[N-1:H]), .b(b[N-1:H]), .p(p_hh));

    rfas_chain #(.WIDTH(N)) u_mid (.as_i(1'b0), .a(p_lh), .b(p_hl), .ci(1'b0), .s(mid), .co(mid_c));
    rfas_chain #(.WIDTH(3*H)) u_hi (
      .as_i(1'b0), .a({p_hh, p_ll[N-1:H]}), .b((3*H)'({mid_c, mid})), .ci(1'b0),
      .s(hi), .co(unused_c)
    );
    assign p = {hi, p_ll[H-1:0]};
  end
endmodule
