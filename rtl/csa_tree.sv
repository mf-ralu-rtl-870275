// Carry-save compressor tree of reversible full adders.
//
// Reduces ROWS addends of W bits to two (sum and carry) whose total equals
// the sum of the addends mod 2^W. Each layer groups the rows in threes and
// replaces every group by a row of FAS cells (sum row, and carry row shifted
// up one place with 0 in bit 0); rows left over pass to the next layer. The
// layers are built by instantiating this module again on the smaller row
// count. Combinational, depth about log1.5(ROWS) FAS cells.
// When this self-instantiating module is linted as its own top, the Verilator
// linter reports the outputs of the nested copy as undriven; they are driven (the
// module's testbench checks every output bit), and the warning does not
// appear when the module is used inside another one.
module csa_tree #(
  parameter int ROWS = 3,
  parameter int W    = 16
) (
  input  logic [ROWS-1:0][W-1:0] d,
  output logic [W-1:0]           sum,
  output logic [W-1:0]           carry
);
  if (ROWS == 1) begin : g_one
    assign sum   = d[0];
    assign carry = '0;
  end else if (ROWS == 2) begin : g_two
    assign sum   = d[0];
    assign carry = d[1];
  end else begin : g_layer
    localparam int G    = ROWS / 3;
    localparam int R    = ROWS % 3;
    localparam int NEXT = 2 * G + R;
    logic [NEXT-1:0][W-1:0] nx;
    for (genvar j = 0; j < G; j++) begin : g_grp
      logic [W-1:0] c;
      for (genvar i = 0; i < W; i++) begin : g_bit
        logic [2:0] unused_g;
        rev_fas u_fas (.as_i(1'b0), .a(d[3*j][i]), .b(d[3*j+1][i]), .ci(d[3*j+2][i]),
                       .sd(nx[2*j][i]), .cb(c[i]), .g(unused_g));
      end
      assign nx[2*j+1] = {c[W-2:0], 1'b0};
    end
    for (genvar r = 0; r < R; r++) begin : g_pass
      assign nx[2*G+r] = d[3*G+r];
    end
    csa_tree #(.ROWS(NEXT), .W(W)) u_next (.d(nx), .sum(sum), .carry(carry));
  end
endmodule
