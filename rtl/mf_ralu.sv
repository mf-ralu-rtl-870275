// Multi-functional reversible ALU (MF-RALU): 30 operations on 32-bit A and B.
//
// All units compute in parallel; three reversible multiplexer trees choose
// the result by the 5-bit operation code alu_in:
//   0-7    RAU   B, B+1, A+B, A+B+1, ~A+B, ~A+B+1, B-1, B
//   8-15   RLU   OR, NOR, A, AND, ~A, XOR, XNOR, NAND
//   16-23  MUX1 (32-bit 8:1 on alu_in[2:0]): ROC ~A, RTC -A, RRBS A>>B[4:0],
//          RLBS A<<B[4:0], RMUX c?A:B, RRCA A+B, RRCS A-B, RCLA A+B+c
//   24-31  MUX2 (64-bit 8:1 on alu_in[2:0]): RCSKA, RCSA, RKSA A+B+c (33-bit
//          results), RAM A*B, RMBM A*B (signed when c=1), RWM A*B, 0, 0
// MUX3 (64-bit 4:1 on alu_in[4:3]) picks RAU, RLU, MUX1 (all zero-extended)
// or MUX2. The mux structure and code assignment follow the reference block
// diagram. Where the shift amount, the RMUX select, the adders' carry in and
// the Booth sign come from is not specified there: here the shift amount is
// B[4:0] and the single input c serves the other three. MUX1 is 32 bits wide,
// so RRCA, RRCS and RCLA results lose their carry. Fully combinational: one
// operation per clock when used in a registered datapath.
module mf_ralu
  import mfralu_pkg::*;
#(
  parameter int WIDTH = 32
) (
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  input  logic [4:0]         alu_in,
  input  logic               c,
  output logic [2*WIDTH-1:0] f
);
  localparam int SW = $clog2(WIDTH);

  logic [WIDTH-1:0]   f_rau, f_rlu, f_roc, f_rtc, f_rrbs, f_rlbs, f_rmux, f_rrca, f_rrcs, f_rcla;
  logic [WIDTH-1:0]   f_rcska, f_rcsa, f_rksa, f_mux1;
  logic               co_rcska, co_rcsa, co_rksa;
  logic [2*WIDTH-1:0] f_ram, f_rmbm, f_rwm, f_mux2;
  logic               unused_co_rau, unused_co_rrca, unused_co_rrcs, unused_co_rcla;

  rau   #(.WIDTH(WIDTH)) u_rau   (.a(a), .b(b), .s(alu_in[2:0]), .f(f_rau), .co(unused_co_rau));
  rlu   #(.WIDTH(WIDTH)) u_rlu   (.a(a), .b(b), .s(alu_in[2:0]), .f(f_rlu));
  roc   #(.WIDTH(WIDTH)) u_roc   (.a(a), .f(f_roc));
  rtc   #(.WIDTH(WIDTH)) u_rtc   (.a(a), .f(f_rtc));
  rrbs  #(.WIDTH(WIDTH)) u_rrbs  (.a(a), .sh(b[SW-1:0]), .f(f_rrbs));
  rlbs  #(.WIDTH(WIDTH)) u_rlbs  (.a(a), .sh(b[SW-1:0]), .f(f_rlbs));
  rmux  #(.WIDTH(WIDTH)) u_rmux  (.a(a), .b(b), .s(c), .f(f_rmux));
  rrcs  #(.WIDTH(WIDTH)) u_rrca  (.a(a), .b(b), .as_i(1'b0), .s(f_rrca), .co(unused_co_rrca));
  rrcs  #(.WIDTH(WIDTH)) u_rrcs  (.a(a), .b(b), .as_i(1'b1), .s(f_rrcs), .co(unused_co_rrcs));
  rcla  #(.WIDTH(WIDTH)) u_rcla  (.a(a), .b(b), .ci(c), .s(f_rcla), .co(unused_co_rcla));
  rcska #(.WIDTH(WIDTH)) u_rcska (.a(a), .b(b), .ci(c), .s(f_rcska), .co(co_rcska));
  rcsa  #(.WIDTH(WIDTH)) u_rcsa  (.a(a), .b(b), .ci(c), .s(f_rcsa), .co(co_rcsa));
  rksa  #(.WIDTH(WIDTH)) u_rksa  (.a(a), .b(b), .ci(c), .s(f_rksa), .co(co_rksa));
  ram_mult #(.N(WIDTH))  u_ram   (.a(a), .b(b), .p(f_ram));
  rmbm  #(.WIDTH(WIDTH)) u_rmbm  (.a(a), .b(b), .sign(c), .p(f_rmbm));
  rwm   #(.WIDTH(WIDTH)) u_rwm   (.a(a), .b(b), .p(f_rwm));

  rmux_tree #(.WIDTH(WIDTH), .SEL_BITS(3)) u_mux1 (
    .d({f_rcla, f_rrcs, f_rrca, f_rmux, f_rlbs, f_rrbs, f_rtc, f_roc}),
    .sel(alu_in[2:0]), .f(f_mux1)
  );

  rmux_tree #(.WIDTH(2*WIDTH), .SEL_BITS(3)) u_mux2 (
    .d({(2*WIDTH)'(0), (2*WIDTH)'(0), f_rwm, f_rmbm, f_ram,
        (2*WIDTH)'({co_rksa, f_rksa}), (2*WIDTH)'({co_rcsa, f_rcsa}), (2*WIDTH)'({co_rcska, f_rcska})}),
    .sel(alu_in[2:0]), .f(f_mux2)
  );

  rmux_tree #(.WIDTH(2*WIDTH), .SEL_BITS(2)) u_mux3 (
    .d({f_mux2, (2*WIDTH)'(f_mux1), (2*WIDTH)'(f_rlu), (2*WIDTH)'(f_rau)}),
    .sel(alu_in[4:3]), .f(f)
  );
endmodule
