// Decoding unit: splits the 16-bit instruction {c, alu_in, rdx, rdy} into the
// 5-bit operation code, the two 5-bit data memory addresses and the c bit
// (carry in, RMUX select or Booth sign). The field layout is this design's
// own; the reference design gives only the three 5-bit fields. Combinational.
module decode_unit
  import mfralu_pkg::*;
(
  input  logic [IW-1:0] f_inst,
  output logic [4:0]    alu_in,
  output logic [4:0]    rdx,
  output logic [4:0]    rdy,
  output logic          c
);
  inst_t inst;
  assign inst   = inst_t'(f_inst);
  assign alu_in = inst.alu_in;
  assign rdx    = inst.rdx;
  assign rdy    = inst.rdy;
  assign c      = inst.c;
endmodule
