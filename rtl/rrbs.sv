// Reversible right barrel shifter (RRBS): f = a >> sh, zeros shifted in.
//
// log2(WIDTH) stages; stage k is a row of WIDTH MFG multiplexers that either
// pass the word or move it right by 2^k, selected by sh[k]. For WIDTH=32 that
// is 5 x 32 = 160 MFGs. Combinational.
module rrbs
  import rev_gates_pkg::*;
#(
  parameter int WIDTH = 32,
  localparam int SW = $clog2(WIDTH)
) (
  input  logic [WIDTH-1:0] a,
  input  logic [SW-1:0]    sh,
  output logic [WIDTH-1:0] f
);
  logic [SW:0][WIDTH-1:0] st;

  always_comb begin
    st[0] = a;
    for (int k = 0; k < SW; k++)
      for (int i = 0; i < WIDTH; i++)
        st[k+1][i] = mfg_mux(sh[k], st[k][i], (i + (1 << k) < WIDTH) ? st[k][i + (1 << k)] : 1'b0);
    f = st[SW];
  end
endmodule
