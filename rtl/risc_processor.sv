// Single-cycle RISC processor around the MF-RALU.
//
// Fetching unit -> decoding unit -> data memory -> MF-RALU. Each clock the PC
// advances, the instruction at the PC is decoded into alu_in, Rdx, Rdy and c,
// the data memory returns Rx = DM[Rdx] and Ry = DM[Rdy], and the MF-RALU
// result for that instruction appears on alu_out in the same cycle
// (combinational from the PC register). alu_in, rx and ry are brought out
// for observation. rst (active high) loads the PC with pro_in.
module risc_processor
  import mfralu_pkg::*;
#(
  parameter logic [IM_DEPTH-1:0][IW-1:0]   IM_INIT = default_im(),
  parameter logic [DM_DEPTH-1:0][XLEN-1:0] DM_INIT = default_dm()
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [7:0]      pro_in,
  output logic [7:0]      pc,
  output logic [4:0]      alu_in,
  output logic [XLEN-1:0] rx,
  output logic [XLEN-1:0] ry,
  output logic [2*XLEN-1:0] alu_out
);
  logic [IW-1:0] f_inst;
  logic [4:0]    rdx, rdy;
  logic          c;

  fetch_unit #(.DEPTH(IM_DEPTH), .INIT(IM_INIT)) u_fu (
    .clk(clk), .rst(rst), .pro_in(pro_in), .pc(pc), .f_inst(f_inst));

  decode_unit u_du (.f_inst(f_inst), .alu_in(alu_in), .rdx(rdx), .rdy(rdy), .c(c));

  data_memory #(.DEPTH(DM_DEPTH), .WIDTH(XLEN), .INIT(DM_INIT)) u_dm (
    .rdx(rdx), .rdy(rdy), .rx(rx), .ry(ry));

  mf_ralu #(.WIDTH(XLEN)) u_alu (.a(rx), .b(ry), .alu_in(alu_in), .c(c), .f(alu_out));
endmodule
