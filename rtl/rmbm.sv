// Reversible modified Booth multiplier (RMBM): p = a * b, 32 x 32 -> 64.
//
// sign=1 treats a and b as two's complement numbers, sign=0 as unsigned.
// Booth partial product generator: b is extended by two bits (sign or zero)
// and recoded in radix 4 into WIDTH/2+1 digits in {-2..2}, digit j from bits
// (b[2j+1], b[2j], b[2j-1]). Each partial product is 0, a or 2a chosen by MFG
// multiplexers, inverted by Feynman gates when the digit is negative, with
// the +1 of that negation collected in a separate "neg" row. The partial
// products are sign-extended to 2*WIDTH bits and placed at 2j, the whole set
// is reduced to sum and carry rows by a carry-save FAS tree, and a 2*WIDTH-bit
// FAS ripple gives the product. WIDTH must be even. Combinational.
module rmbm
  import rev_gates_pkg::*;
#(
  parameter int WIDTH = 32,
  localparam int ND = WIDTH / 2 + 1,   // number of Booth digits
  localparam int PW = 2 * WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             sign,
  output logic [PW-1:0]    p
);
  logic [WIDTH+1:0]             ax;    // a extended to WIDTH+2 bits
  logic [WIDTH+2:0]             bx;    // {ext, ext, b, 0}
  logic [ND-1:0]                neg, one, two;
  logic [ND-1:0][WIDTH+1:0]     pp;
  logic [ND:0][PW-1:0]          rows;
  logic [PW-1:0]                cs_sum, cs_carry;
  logic                         unused_co;
  logic [1:0]                   t_fg;

  always_comb begin
    ax = {{2{sign & a[WIDTH-1]}}, a};
    bx = {{2{sign & b[WIDTH-1]}}, b, 1'b0};
    t_fg = '0;
    rows = '0;
    for (int j = 0; j < ND; j++) begin
      neg[j] = bx[2*j+2] & ~(bx[2*j+1] & bx[2*j]);
      one[j] = bx[2*j+1] ^ bx[2*j];
      two[j] = (bx[2*j+2] & ~bx[2*j+1] & ~bx[2*j]) | (~bx[2*j+2] & bx[2*j+1] & bx[2*j]);
      for (int i = 0; i < WIDTH + 2; i++) begin
        // 0 / a / 2a by multiplexers, then conditional inversion by an FG
        t_fg = fg(neg[j], mfg_mux(two[j], mfg_mux(one[j], 1'b0, ax[i]),
                                          (i == 0) ? 1'b0 : ax[i-1]));
        pp[j][i] = t_fg[0];
      end
      rows[j] = PW'({{(PW - WIDTH - 2){pp[j][WIDTH+1]}}, pp[j]} << (2 * j));
      rows[ND][2*j] = neg[j];
    end
  end

  csa_tree #(.ROWS(ND + 1), .W(PW)) u_csa (.d(rows), .sum(cs_sum), .carry(cs_carry));

  rfas_chain #(.WIDTH(PW)) u_add (.as_i(1'b0), .a(cs_sum), .b(cs_carry), .ci(1'b0),
                                  .s(p), .co(unused_co));
endmodule
