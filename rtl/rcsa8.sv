// 8-bit reversible carry select adder block: {co, s} = a + b + ci.
//
// Each nibble is added twice by 4-bit FAS ripples, once with carry in 0 and
// once with 1. MFG multiplexers then pick the low nibble's sum and carry by
// ci, and the high nibble's sum and the block carry out by the selected low
// carry. Four 4-bit FAS and four multiplexers, as in the reference figure.
// Combinational.
module rcsa8
  import rev_gates_pkg::*;
(
  input  logic [7:0] a,
  input  logic [7:0] b,
  input  logic       ci,
  output logic [7:0] s,
  output logic       co
);
  logic [3:0] s_lo0, s_lo1, s_hi0, s_hi1;
  logic       c_lo0, c_lo1, c_hi0, c_hi1, c_mid;

  rfas_chain #(.WIDTH(4)) u_lo0 (.as_i(1'b0), .a(a[3:0]), .b(b[3:0]), .ci(1'b0), .s(s_lo0), .co(c_lo0));
  rfas_chain #(.WIDTH(4)) u_lo1 (.as_i(1'b0), .a(a[3:0]), .b(b[3:0]), .ci(1'b1), .s(s_lo1), .co(c_lo1));
  rfas_chain #(.WIDTH(4)) u_hi0 (.as_i(1'b0), .a(a[7:4]), .b(b[7:4]), .ci(1'b0), .s(s_hi0), .co(c_hi0));
  rfas_chain #(.WIDTH(4)) u_hi1 (.as_i(1'b0), .a(a[7:4]), .b(b[7:4]), .ci(1'b1), .s(s_hi1), .co(c_hi1));

  always_comb begin
    for (int i = 0; i < 4; i++) s[i] = mfg_mux(ci, s_lo0[i], s_lo1[i]);
    c_mid = mfg_mux(ci, c_lo0, c_lo1);
    for (int i = 0; i < 4; i++) s[4+i] = mfg_mux(c_mid, s_hi0[i], s_hi1[i]);
    co = mfg_mux(c_mid, c_hi0, c_hi1);
  end
endmodule
