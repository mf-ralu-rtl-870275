// Top level: the MF-RALU RISC processor, and beside it the 1-bit reversible
// ALU (16 operations) on its own ports.
//
// Processor ports: clk, rst (active high, held low to run), pro_in (start
// address), and the observed alu_in, rx, ry, pc and the 64-bit alu_out, which
// is valid in the same cycle as the instruction at pc. 1-bit RALU ports:
// ralu_a, ralu_b, ralu_s[3:0] -> ralu_fo, ralu_co, purely combinational.
module mfralu_top
  import mfralu_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic [7:0]        pro_in,
  output logic [7:0]        pc,
  output logic [4:0]        alu_in,
  output logic [XLEN-1:0]   rx,
  output logic [XLEN-1:0]   ry,
  output logic [2*XLEN-1:0] alu_out,
  input  logic              ralu_a,
  input  logic              ralu_b,
  input  logic [3:0]        ralu_s,
  output logic              ralu_fo,
  output logic              ralu_co
);
  risc_processor u_cpu (
    .clk(clk), .rst(rst), .pro_in(pro_in), .pc(pc),
    .alu_in(alu_in), .rx(rx), .ry(ry), .alu_out(alu_out));

  ralu #(.WIDTH(1)) u_ralu1 (
    .a(ralu_a), .b(ralu_b), .s(ralu_s), .fo(ralu_fo), .co(ralu_co));
endmodule
