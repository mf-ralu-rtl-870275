// Reversible carry skip adder (RCSKA): {co, s} = a + b + ci.
//
// WIDTH/4 blocks, each a 4-bit FAS ripple and a 4-bit carry-skip logic unit
// (RCSL). Block k adds its nibble with carry in cin_k and gives ripple carry
// ca_k; its RCSL gives cs_k = (P_k & skip_in_k) | ca_k, where
// P_k = AND over the nibble of (a|b) built with MCF OR/AND gates. As in the
// reference structure, block 0 takes ci on its FAS and 0 on its RCSL, and
// every later block takes cs_{k-1} on both; the last cs is co.
// WIDTH must be a multiple of 4. Combinational.
module rcska
  import rev_gates_pkg::*;
#(
  parameter int WIDTH = 32,
  localparam int NB = WIDTH / 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             ci,
  output logic [WIDTH-1:0] s,
  output logic             co
);
  logic [NB-1:0] ca, cs, prop;
  logic [NB:0]   skip_in, fas_in;

  assign skip_in[0] = 1'b0;
  assign fas_in[0]  = ci;

  for (genvar k = 0; k < NB; k++) begin : g_blk
    rfas_chain #(.WIDTH(4)) u_fas (
      .as_i(1'b0), .a(a[4*k +: 4]), .b(b[4*k +: 4]), .ci(fas_in[k]),
      .s(s[4*k +: 4]), .co(ca[k])
    );

    // RCSL: equation co = (p0.p1).(p2.p3).ci + ca with p = a + b
    logic [3:0] po;
    logic [2:0] t_or [4];
    logic [2:0] t_a01, t_a23, t_all, t_sk, t_co;
    always_comb begin
      for (int j = 0; j < 4; j++) begin
        t_or[j] = mcf_or(a[4*k+j], b[4*k+j]);
        po[j]   = t_or[j][1];
      end
      t_a01   = mcf_and(po[0], po[1]);
      t_a23   = mcf_and(po[2], po[3]);
      t_all   = mcf_and(t_a01[1], t_a23[1]);
      prop[k] = t_all[1];
      t_sk    = mcf_and(prop[k], skip_in[k]);
      t_co    = mcf_or(t_sk[1], ca[k]);
      cs[k]   = t_co[1];
    end
    assign skip_in[k+1] = cs[k];
    assign fas_in[k+1]  = cs[k];
  end

  assign co = cs[NB-1];
endmodule
